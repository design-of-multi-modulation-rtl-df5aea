// tb_psf_interp: checks the RRC and RC polyphase interpolators in all four
// modes. Random symbols enter every L clocks; the testbench convolves the
// zero-stuffed symbol stream (one symbol then L-1 zeros) with the length
// SPAN*L+1 prototype taps and compares every output sample, including its
// rounding and its timing (sample q of a symbol, q = 0..L-1, appears q+1
// clocks after the edge that takes the symbol). It also checks the taps
// themselves: the RRC taps are symmetric with unit energy (sum of squares
// 2^30 within 1 %); the RC taps are 2^14 at the centre and 0 at every other
// whole-symbol offset.
module tb_psf_interp;
  import mmbmd_pkg::*;
  logic clk = 0, rst_n = 0, sym_valid = 0;
  mod_t mode = MOD_BPSK;
  sample_t sym = '0, y_rrc, y_rc;
  int checks = 0, failures = 0;

  psf_interp #(.IS_RC(1'b0)) dut_rrc (.clk, .rst_n, .mode, .sym_valid, .sym, .y(y_rrc));
  psf_interp #(.IS_RC(1'b1)) dut_rc  (.clk, .rst_n, .mode, .sym_valid, .sym, .y(y_rc));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic longint ref_out(bit is_rc, int l, longint syms[$], int q);
    longint acc = 0;
    int cf = is_rc ? CF_RC : CF_RRC;
    int n = syms.size();
    for (int j = 0; j <= SPAN && j < n; j++)
      acc += syms[n - 1 - j] * coef_l(is_rc, l, j * l + q);
    acc = (acc + (64'sd1 <<< (cf - 1))) >>> cf;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return acc;
  endfunction

  initial begin
    longint syms [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      automatic int l = sps(mod_t'(m));
      longint e;
      e = 0;
      for (int i = 0; i <= SPAN * l; i++) begin
        e += coef_l(0, l, i) * coef_l(0, l, i);
        check(coef_l(0, l, i) == coef_l(0, l, SPAN * l - i), "RRC symmetric");
        if (i % l == 0)
          check(coef_l(1, l, i) == ((i == SPAN * l / 2) ? (1 << CF_RC) : 0), "RC zero crossings");
      end
      check(e > 64'd1063004405 && e < 64'd1084479242, $sformatf("RRC energy %0d", e));
    end
    for (int m = 0; m < 4; m++) begin
      automatic int l = sps(mod_t'(m));
      automatic longint take [$];
      automatic int pc = 0;
      // restart the filters so that no symbol of the previous mode remains
      @(negedge clk);
      rst_n = 0;
      mode = mod_t'(m);
      syms.delete();
      @(negedge clk);
      rst_n = 1;
      // pc counts rising edges from here; a symbol driven now is taken at
      // edge pc+1, and its sample q is registered at edge take+1+q
      for (int c = 0; c < 40 * l; c++) begin
        automatic int n = take.size();
        int q;
        // latest symbol taken at or before edge pc-1
        while (n > 0 && int'(take[n - 1]) > pc - 1) n--;
        if (n > 0) begin
          q = pc - 1 - int'(take[n - 1]);
          if (q >= 0 && q < l) begin
            longint s_sub [$];
            s_sub = syms[0:n-1];
            check(longint'(y_rrc) == ref_out(0, l, s_sub, q),
                  $sformatf("RRC mode %0d sym %0d q %0d: %0d vs %0d", m, n, q, y_rrc, ref_out(0, l, s_sub, q)));
            check(longint'(y_rc) == ref_out(1, l, s_sub, q),
                  $sformatf("RC mode %0d sym %0d q %0d: %0d vs %0d", m, n, q, y_rc, ref_out(1, l, s_sub, q)));
          end
        end
        sym_valid = 0;
        if (c % l == 0) begin
          int a;
          a = (syms.size() == 3) ? 3 : (syms.size() < 3) ? 0 : int'($urandom_range(0, 6)) - 3;
          sym = sample_t'(a * MU);
          sym_valid = 1;
          syms.push_back(a * MU);
          take.push_back(pc + 1);
        end
        @(negedge clk);
        pc++;
      end
      sym_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
