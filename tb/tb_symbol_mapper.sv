// tb_symbol_mapper: feeds random bits serially to the mapper in each of the
// four modulations and compares every symbol with the Gray-coded amplitude
// table of the testbench (first bit of a symbol = most significant):
//   2 levels: 0 -> -1, 1 -> +1;  4 levels: 00 -3, 01 -1, 11 +1, 10 +3,
// QPSK/16-QAM: I from the first half of the bits, Q from the second half,
// scaled by MU. Also checks that sym_valid follows sym_tick by one clock.
module tb_symbol_mapper;
  import mmbmd_pkg::*;
  logic clk = 0, rst_n = 0, bit_valid = 0, bit_i = 0, sym_tick = 0, sym_valid;
  mod_t mode = MOD_BPSK;
  sample_t sym_i, sym_q;
  int checks = 0, failures = 0;

  symbol_mapper dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic int lv2(bit b); return b ? 1 : -1; endfunction
  function automatic int lv4(bit [1:0] b);
    int t [4] = '{-3, -1, 3, 1};   // indexed by the binary value of the Gray pair
    return t[b];
  endfunction

  task automatic one_symbol(mod_t m);
    int k, ei, eq;
    bit [3:0] b;
    k = bits_per_sym(m);
    b = 4'($urandom);
    for (int i = k - 1; i >= 0; i--) begin
      @(negedge clk); bit_valid = 1; bit_i = b[i];
      @(negedge clk); bit_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    case (m)
      MOD_BPSK:  begin ei = lv2(b[0]);   eq = 0; end
      MOD_4PAM:  begin ei = lv4(b[1:0]); eq = 0; end
      MOD_QPSK:  begin ei = lv2(b[1]);   eq = lv2(b[0]); end
      default:   begin ei = lv4(b[3:2]); eq = lv4(b[1:0]); end
    endcase
    sym_tick = 1;
    #1;
    check(sym_valid == 0, "no output before the clock edge that takes the tick");
    @(negedge clk); sym_tick = 0;
    check(sym_valid == 1, "sym_valid one clock after sym_tick");
    check(32'(sym_i) == ei * MU && 32'(sym_q) == eq * MU,
          $sformatf("%s bits %b: got %0d,%0d want %0d,%0d", m.name(), b, sym_i, sym_q, ei * MU, eq * MU));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      mode = mod_t'(m);
      repeat (60) one_symbol(mod_t'(m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
