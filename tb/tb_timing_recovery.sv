// tb_timing_recovery: feeds the timing recovery with a raised cosine pulse
// train (what the RRC transmit and matched filters produce together) of
// random symbols, at L samples per symbol with a chosen sampling offset, in
// every mode and at several offsets. It checks that the loop locks, that
// after lock every strobed sample lies within MU/4 of an ideal amplitude
// (+-MU, +-3MU) on I and, in QPSK/16-QAM, on Q, that strobes come once
// every L clocks, and that both early and late timing steps occurred.
module tb_timing_recovery;
  import mmbmd_pkg::*;
  logic clk = 0, rst_n = 0, strobe, locked, step_early, step_late;
  mod_t mode = MOD_BPSK;
  sample_t y_i = '0, y_q = '0, s_i, s_q;
  logic [$clog2(LMAX)-1:0] n_opt;
  int checks = 0, failures = 0, n_early = 0, n_late = 0;

  timing_recovery dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (step_early) n_early++;
    if (step_late)  n_late++;
  end

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

  function automatic bit near_level(sample_t v, bit four);
    int a = v;
    int d1 = (a > 0 ? a : -a) - MU;
    int d3 = (a > 0 ? a : -a) - 3 * MU;
    if (d1 < 0) d1 = -d1;
    if (d3 < 0) d3 = -d3;
    return (d1 < MU / 4) || (four && d3 < MU / 4);
  endfunction

  task automatic run(mod_t m, int off);
    automatic int l = sps(m);
    automatic int nsym = 1200;
    automatic int a_i [] = new [nsym];
    automatic int a_q [] = new [nsym];
    automatic bit four = (m == MOD_4PAM || m == MOD_16QAM);
    automatic int lock_at = -1, bad = 0, nstrobe = 0, gap_bad = 0, last = -1;
    for (int s = 0; s < nsym; s++) begin
      a_i[s] = four ? 2 * int'($urandom_range(0, 3)) - 3 : 2 * int'($urandom_range(0, 1)) - 1;
      a_q[s] = !two_dim(m) ? 0 : four ? 2 * int'($urandom_range(0, 3)) - 3 : 2 * int'($urandom_range(0, 1)) - 1;
    end
    @(negedge clk);
    rst_n = 0;
    mode = m;
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < nsym * l; n++) begin
      automatic longint vi = 0, vq = 0;
      for (int s = (n - off) / l - SPAN / 2 - 1; s <= (n - off) / l + SPAN / 2 + 1; s++) begin
        automatic int d = n - s * l - off;
        if (s >= 0 && s < nsym && d >= -SPAN * l / 2 && d <= SPAN * l / 2) begin
          vi += longint'(a_i[s] * MU) * coef_l(1, l, d + SPAN * l / 2);
          vq += longint'(a_q[s] * MU) * coef_l(1, l, d + SPAN * l / 2);
        end
      end
      y_i = sample_t'(vi >>> CF_RC);
      y_q = sample_t'(vq >>> CF_RC);
      @(posedge clk); #1;
      if (locked && lock_at < 0) lock_at = n;
      if (strobe && lock_at >= 0 && n > lock_at + 2 * l) begin
        nstrobe++;
        if (!near_level(s_i, four) || (two_dim(m) && !near_level(s_q, four))) bad++;
        if (last >= 0 && n - last != l) gap_bad++;
      end
      if (strobe) last = n;
      @(negedge clk);
    end
    $display("%-9s offset %2d: lock at sample %0d, n_opt %0d, strobes %0d, off-level %0d",
             m.name(), off, lock_at, n_opt, nstrobe, bad);
    check(lock_at >= 0, "locks");
    check(32'(n_opt) == off % l, "timing index settles on the offset");
    check(nstrobe > 100 && bad == 0, "strobes on the symbol peaks after lock");
    check(gap_bad == 0, "one strobe every L clocks after lock");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run(MOD_BPSK, 0);
    run(MOD_BPSK, 2);
    run(MOD_4PAM, 5);
    run(MOD_QPSK, 3);
    run(MOD_16QAM, 12);
    run(MOD_16QAM, 7);
    check(n_early > 0 && n_late > 0, $sformatf("early %0d and late %0d steps", n_early, n_late));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
