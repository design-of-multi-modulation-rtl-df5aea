// tb_mmbd: drives the demodulator's ADC inputs with a signal built by the
// testbench itself: random bits, Gray-mapped to symbols, zero-stuffed to L
// samples per symbol, convolved with the RRC taps, cut to the 14-bit ADC
// word and delayed by a mode-dependent number of samples. In every mode it
// checks that timing locks, that the recovered bit stream equals the sent
// one (after finding the delay between them) without a single error, that
// recovered bits come one every SPB clocks, and that the RC re-shaped
// output equals each recovered symbol amplitude at its symbol instant.
module tb_mmbd;
  import mmbmd_pkg::*;
  logic clk = 0, rst_n = 0;
  mod_t mode = MOD_BPSK;
  logic signed [ADC_W-1:0] adc_i = '0, adc_q = '0;
  sample_t mf_i, mf_q, rc_i, rc_q;
  logic sym_valid, rx_bit, rx_bit_valid, locked, step_early, step_late;
  logic [KMAX-1:0] sym_bits;
  logic [$clog2(LMAX)-1:0] n_opt;
  int checks = 0, failures = 0;

  mmbd dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  int lv4 [4] = '{-3, -1, 3, 1};

  task automatic run(mod_t m, int dly);
    automatic int l = sps(m), k = bits_per_sym(m);
    automatic int nsym = 1000;
    automatic bit txb [$];
    automatic bit rxb [$];
    automatic int a_i [] = new [nsym];
    automatic int a_q [] = new [nsym];
    automatic int lock_at = -1, last = -1, gap_bad = 0, best = 1 << 30, rc_bad = 0, n_rc = 0;
    automatic longint rec_i [$], rec_q [$];
    automatic int sv_d = 0;
    for (int s = 0; s < nsym; s++) begin
      automatic logic [3:0] b = 4'($urandom);
      for (int i = k - 1; i >= 0; i--) txb.push_back(b[i]);
      case (m)
        MOD_BPSK: begin a_i[s] = b[0] ? 1 : -1; a_q[s] = 0; end
        MOD_4PAM: begin a_i[s] = lv4[b[1:0]]; a_q[s] = 0; end
        MOD_QPSK: begin a_i[s] = b[1] ? 1 : -1; a_q[s] = b[0] ? 1 : -1; end
        default:  begin a_i[s] = lv4[b[3:2]]; a_q[s] = lv4[b[1:0]]; end
      endcase
    end
    @(negedge clk);
    rst_n = 0;
    mode = m;
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < nsym * l; n++) begin
      automatic longint vi = 0, vq = 0;
      automatic int t = n - dly;
      // transmit sample t: sum over symbols s of a[s]*MU*h[t - s*L] (taps 0..SPAN*L)
      for (int s = t / l - SPAN - 1; s <= t / l + 1; s++) begin
        automatic int d = t - s * l;
        if (t >= 0 && s >= 0 && s < nsym && d >= 0 && d <= SPAN * l) begin
          vi += longint'(a_i[s] * MU) * coef_l(0, l, d);
          vq += longint'(a_q[s] * MU) * coef_l(0, l, d);
        end
      end
      adc_i = ADC_W'((vi >>> CF_RRC) >>> (DW - ADC_W));
      adc_q = ADC_W'((vq >>> CF_RRC) >>> (DW - ADC_W));
      @(posedge clk); #1;
      if (locked && lock_at < 0) lock_at = n;
      if (lock_at >= 0) begin
        if (rx_bit_valid) begin
          rxb.push_back(rx_bit);
          if (last >= 0 && n - last != SPB) gap_bad++;
          last = n;
        end
        // RC output two clocks after a symbol = amplitude SPAN/2 symbols older
        if (sv_d == 2 && rec_i.size() > SPAN / 2 + 1) begin
          n_rc++;
          if (longint'(rc_i) != rec_i[rec_i.size() - 1 - SPAN / 2] ||
              longint'(rc_q) != rec_q[rec_q.size() - 1 - SPAN / 2]) rc_bad++;
        end
      end
      sv_d = sym_valid ? 1 : (sv_d == 1) ? 2 : 0;
      if (sym_valid) begin
        rec_i.push_back(dut.rec_i);
        rec_q.push_back(dut.rec_q);
      end
      @(negedge clk);
    end
    // align received bits (skip the first 16) with the sent ones
    for (int d = 0; d + 300 <= txb.size() && rxb.size() >= 316; d++) begin
      automatic int err = 0;
      for (int i = 0; i < 300; i++) if (rxb[16 + i] != txb[d + i]) err++;
      if (err < best) best = err;
    end
    $display("%-9s delay %2d: lock at %0d, n_opt %0d, rx bits %0d, errors %0d, rc checked %0d bad %0d",
             m.name(), dly, lock_at, n_opt, rxb.size(), best, n_rc, rc_bad);
    check(lock_at >= 0, "locks");
    check(rxb.size() >= 316 && best == 0, "bits recovered without error");
    check(gap_bad == 0, "one bit every SPB clocks");
    check(n_rc > 20 && rc_bad == 0, "RC output at symbol instants");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run(MOD_BPSK, 1);
    run(MOD_4PAM, 6);
    run(MOD_QPSK, 13);
    run(MOD_16QAM, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
