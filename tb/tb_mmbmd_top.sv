// tb_mmbmd_top: end-to-end test of the integrated modulator/demodulator.
//
// The DAC outputs are looped back to the ADC inputs through a channel that
// drops the two LSBs (16-bit DAC word to 14-bit ADC word) and delays the
// signal by a number of samples that differs per mode. For each modulation
// (BPSK, 4-PAM, QPSK, 16-QAM, and BPSK again) the test switches the mode,
// checks the transmitted bits against its own x^9+x^5+1 sequence, waits for
// timing lock, aligns the received bit stream with the transmitted one and
// counts bit errors, checks the bit rate (one bit per SPB clocks) and the
// symbol rate (one symbol every k*SPB clocks), and checks the RC re-shaped
// output against the recovered symbol amplitudes at the symbol instants.
// It also checks the SPI setup words and counts each mechanism: SPI words,
// mode switches, locks, early and late timing steps.
module tb_mmbmd_top;
  import mmbmd_pkg::*;

  localparam int NBITS_CMP = 400;

  logic clk = 0, rst_n = 0;
  logic [1:0] mod_sel;
  logic [8:0] seed;
  sample_t dac_i, dac_q, rc_i, rc_q;
  logic signed [ADC_W-1:0] adc_i, adc_q;
  logic rx_bit, rx_bit_valid, rx_sym_valid, locked, step_early, step_late;
  logic tx_bit, tx_bit_valid, spi_sclk, spi_sdata, cfg_done;
  logic [KMAX-1:0] rx_sym_bits;
  logic [$clog2(LMAX)-1:0] n_opt;
  logic [2:0] spi_cs_n;
  mod_t mode;

  int checks = 0, failures = 0;
  int n_spi_words = 0, n_switch = 0, n_lock = 0, n_early = 0, n_late = 0;
  int ch_delay = 3;
  longint cycle = 0;

  mmbmd_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // channel: 16-bit -> 14-bit, variable delay (up to 63 samples)
  sample_t pipe_i [64], pipe_q [64];
  always @(posedge clk) begin
    pipe_i[0] <= dac_i;
    pipe_q[0] <= dac_q;
    for (int i = 1; i < 64; i++) begin pipe_i[i] <= pipe_i[i-1]; pipe_q[i] <= pipe_q[i-1]; end
  end
  assign adc_i = ADC_W'(pipe_i[ch_delay] >>> (DW - ADC_W));
  assign adc_q = ADC_W'(pipe_q[ch_delay] >>> (DW - ADC_W));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0d %s", cycle, what);
    end
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SPI monitor: count words (falling edges of any cs_n)
  logic [2:0] cs_d = '1;
  always @(posedge clk) begin
    cs_d <= spi_cs_n;
    if (rst_n && (cs_d & ~spi_cs_n) != 0) n_spi_words++;
    if (step_early) n_early++;
    if (step_late)  n_late++;
  end

  // transmitted bit history and reference sequence
  bit   txh [$];
  bit   ref_ok = 1;
  logic [8:0] ref_sr;
  longint last_tx_bit_cyc, last_rx_bit_cyc;
  int   tx_gap_bad = 0, rx_gap_bad = 0, n_rx_gap = 0;
  always @(posedge clk) begin
    if (tx_bit_valid) begin
      if (txh.size() > 0 && (cycle - last_tx_bit_cyc) != SPB) tx_gap_bad++;
      last_tx_bit_cyc = cycle;
      txh.push_back(tx_bit);
      if (tx_bit !== ref_sr[8]) ref_ok = 0;
      ref_sr = {ref_sr[7:0], ref_sr[8] ^ ref_sr[4]};
    end
  end

  bit   rxh [$];
  bit   rx_on = 0;
  always @(posedge clk) begin
    if (rx_on && rx_bit_valid) begin
      if (rxh.size() > 0) begin
        n_rx_gap++;
        if ((cycle - last_rx_bit_cyc) != SPB) rx_gap_bad++;
      end
      last_rx_bit_cyc = cycle;
      rxh.push_back(rx_bit);
    end
  end

  // symbol rate and RC re-shaping check: at the RC filter's symbol instant
  // the output equals the recovered amplitude (RC has zero ISI there)
  longint last_sym_cyc;
  int sym_gap_bad = 0, n_sym = 0;
  bit sym_on = 0;
  sample_t recq_i [$], recq_q [$];
  int rc_bad = 0, n_rc = 0;
  logic [1:0] sv_d = '0;
  always @(posedge clk) begin
    sv_d <= {sv_d[0], dut.u_mmbd.sym_valid};
    if (dut.u_mmbd.sym_valid) begin
      recq_i.push_back(dut.u_mmbd.rec_i);
      recq_q.push_back(dut.u_mmbd.rec_q);
    end
    // the RC output two clocks after a symbol is the amplitude SPAN/2
    // symbols older (RC taps at whole symbol offsets are zero)
    if (sym_on && sv_d[1] && recq_i.size() > SPAN / 2 + 1) begin
      n_rc++;
      if (rc_i != recq_i[recq_i.size() - 1 - SPAN / 2] || rc_q != recq_q[recq_q.size() - 1 - SPAN / 2])
        rc_bad++;
    end
    if (sym_on && dut.u_mmbd.sym_valid) begin
      if (n_sym > 0 && (cycle - last_sym_cyc) != sps(mode)) sym_gap_bad++;
      last_sym_cyc = cycle;
      n_sym++;
    end
  end

  task automatic run_mode(mod_t m, int dly, int sd);
    int best_d, best_err, err;
    longint t0;
    ch_delay = dly;
    seed     = 9'(sd);
    ref_sr   = (sd == 0) ? 9'h1FF : 9'(sd);
    mod_sel  = m;
    txh.delete(); rxh.delete();
    ref_ok = 1; tx_gap_bad = 0; rx_gap_bad = 0; n_rx_gap = 0;
    @(posedge clk);
    // restart is seen when the datapath reset is low
    wait (dut.dp_rst_n == 1'b0);
    n_switch++;
    txh.delete();
    ref_sr = (sd == 0) ? 9'h1FF : 9'(sd);  // an all-zero seed is replaced by ones
    ref_ok = 1;
    wait (dut.dp_rst_n == 1'b1);
    t0 = cycle;
    wait (locked == 1'b1 || cycle - t0 > 60000);
    check(locked, $sformatf("mode %s locks", m.name()));
    if (locked) n_lock++;
    $display("mode %-9s delay %0d: locked after %0d clocks, n_opt=%0d", m.name(), dly, cycle - t0, n_opt);
    rx_on = 1; sym_on = 1; n_sym = 0; sym_gap_bad = 0; n_rc = 0; rc_bad = 0;
    wait (rxh.size() >= NBITS_CMP + 64);
    rx_on = 0; sym_on = 0;
    // align: the received stream is a delayed copy of the transmitted one
    best_err = 1 << 30; best_d = -1;
    for (int d = 0; d + NBITS_CMP <= txh.size(); d++) begin
      err = 0;
      for (int i = 0; i < NBITS_CMP; i++)
        if (rxh[64 + i] != txh[d + i]) err++;
      if (err < best_err) begin best_err = err; best_d = d; end
    end
    $display("  bits compared %0d, errors %0d, tx gaps bad %0d, rx gaps bad %0d, sym gaps bad %0d",
             NBITS_CMP, best_err, tx_gap_bad, rx_gap_bad, sym_gap_bad);
    check(best_err == 0, $sformatf("mode %s bit errors %0d", m.name(), best_err));
    check(ref_ok, "tx bits follow x^9+x^5+1 from the seed");
    check(tx_gap_bad == 0, "tx bit rate one per SPB clocks");
    check(rx_gap_bad == 0 && n_rx_gap > 0, "rx bit rate one per SPB clocks");
    check(sym_gap_bad == 0 && n_sym > 10, "symbol rate one per L clocks");
    check(rc_bad == 0 && n_rc > 10, $sformatf("RC output at symbol instants (%0d of %0d wrong)", rc_bad, n_rc));
  endtask

  initial begin
    mod_sel = MOD_BPSK;
    seed    = 9'h1A5;
    ref_sr  = 9'h1A5;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (cfg_done);
    check(n_spi_words == 3, "three SPI setup words");
    // start in a mode other than the reset mode so that every run is a switch
    mod_sel = MOD_QPSK;
    repeat (5) @(posedge clk);
    run_mode(MOD_BPSK,  3, 9'h1A5);
    run_mode(MOD_4PAM,  11, 9'h0F3);
    run_mode(MOD_QPSK,  6, 9'h155);
    run_mode(MOD_16QAM, 21, 9'h0C7);
    run_mode(MOD_BPSK,  1, 9'h000);
    $display("mechanisms: spi words %0d, mode switches %0d, locks %0d, early steps %0d, late steps %0d",
             n_spi_words, n_switch, n_lock, n_early, n_late);
    check(n_switch >= 5, "mode switches happened");
    check(n_lock >= 5, "timing locks happened");
    check(n_early > 0, "early timing step happened");
    check(n_late > 0, "late timing step happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
