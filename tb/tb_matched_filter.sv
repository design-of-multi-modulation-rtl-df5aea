// tb_matched_filter: drives random samples (and one lone impulse) into the
// folded RRC matched filter in every mode and compares each output with a
// direct (unfolded) convolution of the input with the SPAN*L+1 RRC taps,
// centred in the NMAX-tap window: the output registered at clock edge k+1
// is sum_i tap[i] * x[k - (NMAX-1)/2 + SPAN*L/2 - i] (x[k] taken at edge k),
// rounded like the filter.
// This also checks the latency: the impulse response centre leaves
// (NMAX-1)/2 + 1 clocks after the impulse enters.
module tb_matched_filter;
  import mmbmd_pkg::*;
  localparam int C = (NMAX - 1) / 2;
  logic clk = 0, rst_n = 0;
  mod_t mode = MOD_BPSK;
  sample_t x = '0, y;
  int checks = 0, failures = 0;

  matched_filter dut (.*);
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

  initial begin
    repeat (3) @(posedge clk);
    for (int m = 0; m < 4; m++) begin
      automatic int l = sps(mod_t'(m));
      automatic longint xin [$];
      automatic int peak_at = -1;
      automatic longint peak = 0;
      @(negedge clk);
      rst_n = 0;
      mode = mod_t'(m);
      @(negedge clk);
      rst_n = 1;
      // xin[k] is the sample taken at edge k (k counted from 0 here)
      for (int k = 0; k < 3 * NMAX; k++) begin
        // check the output registered at edge k; xin[j] was taken at edge j+1
        if (k >= 1) begin
          automatic longint acc = 0;
          for (int i = 0; i <= SPAN * l; i++) begin
            automatic int idx = k - 2 - (C - SPAN * l / 2) - i;
            if (idx >= 0) acc += xin[idx] * coef_l(0, l, i);
          end
          acc = (acc + (64'sd1 <<< (CF_RRC - 1))) >>> CF_RRC;
          if (acc > 32767) acc = 32767;
          if (acc < -32768) acc = -32768;
          check(longint'(y) == acc, $sformatf("mode %0d edge %0d: %0d vs %0d", m, k, y, acc));
          if (k < NMAX && longint'(y) > peak) begin peak = y; peak_at = k; end
        end
        // lone impulse first, random samples after NMAX edges
        x = (k == 0) ? sample_t'(8192) : (k < NMAX) ? '0 : sample_t'($urandom_range(0, 16383) - 8192);
        xin.push_back(x);
        @(negedge clk);
      end
      check(peak_at == C + 2, $sformatf("impulse response centre after %0d clocks", peak_at));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
