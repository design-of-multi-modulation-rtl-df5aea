// tb_prbg: checks the pseudo-random bit generator against a reference
// x^9 + x^5 + 1 shift register kept in the testbench: bit sequence from
// several seeds, the 511-bit period, the all-zero seed rule, and that bits
// only advance when enabled (one registered bit per enabled cycle).
module tb_prbg;
  logic clk = 0, rst_n = 0, load = 0, en = 0, bit_o, bit_valid;
  logic [8:0] seed = '0;
  int checks = 0, failures = 0;

  prbg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic run_seed(logic [8:0] s, int nbits, bit gaps);
    logic [8:0] r;
    bit first[$];
    int got = 0, enabled = 0, per = -1;
    r = (s == 0) ? 9'h1FF : s;
    @(negedge clk); seed = s; load = 1;
    @(negedge clk); load = 0;
    while (got < nbits) begin
      en = gaps ? ($urandom_range(0, 2) == 0) : 1'b1;
      @(posedge clk);
      #1;
      if (bit_valid) begin
        check(bit_o == r[8], $sformatf("seed %h bit %0d", s, got));
        first.push_back(bit_o);
        r = {r[7:0], r[8] ^ r[4]};
        got++;
      end
      if (en) enabled++;
      @(negedge clk);
    end
    en = 0;
    // bits counted equal the enabled cycles (the last one may be in flight)
    check(enabled - got <= 1 && enabled >= got, "one bit per enabled cycle");
    if (nbits >= 1022) begin
      for (int i = 0; i < 511; i++) if (first[i] != first[i + 511]) per = i;
      check(per == -1, "period 511");
      per = 0;
      for (int p = 1; p < 511; p++) begin
        bit same = 1;
        for (int i = 0; i < 511; i++) if (first[i] != first[i + p]) same = 0;
        if (same) per = p;
      end
      check(per == 0, "no period shorter than 511");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_seed(9'h1A5, 1100, 0);
    run_seed(9'h001, 200, 1);
    run_seed(9'h000, 200, 0);
    run_seed(9'h0F0, 300, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
