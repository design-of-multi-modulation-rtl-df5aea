// tb_symbol_demapper: drives symbol samples (ideal amplitude plus a random
// error smaller than MU/2) in each modulation and checks the decided bits,
// the recovered amplitudes, and the serial bit stream: k bits, first bit
// first, one every SPB clocks, the first registered two clocks after the clock
// edge that samples the strobe.
module tb_symbol_demapper;
  import mmbmd_pkg::*;
  logic clk = 0, rst_n = 0, strobe = 0, sym_valid, bit_valid, bit_o;
  mod_t mode = MOD_BPSK;
  sample_t s_i = '0, s_q = '0, rec_i, rec_q;
  logic [KMAX-1:0] sym_bits;
  int checks = 0, failures = 0;
  longint cycle = 0;

  symbol_demapper dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

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

  // Gray levels: index = binary value of the bit pair
  int lv4 [4] = '{-3, -1, 3, 1};

  task automatic one_symbol(mod_t m);
    int k, ai, aq;
    bit [3:0] b;
    bit got [$];
    longint tb [$];
    longint t0;
    k = bits_per_sym(m);
    b = 4'($urandom);
    case (m)
      MOD_BPSK: begin b[3:1] = 0; ai = b[0] ? 1 : -1; aq = 0; end
      MOD_4PAM: begin b[3:2] = 0; ai = lv4[b[1:0]]; aq = 0; end
      MOD_QPSK: begin b[3:2] = 0; ai = b[1] ? 1 : -1; aq = b[0] ? 1 : -1; end
      default:  begin ai = lv4[b[3:2]]; aq = lv4[b[1:0]]; end
    endcase
    @(negedge clk);
    s_i = sample_t'(ai * MU + $urandom_range(0, MU - 2) - (MU / 2 - 1));
    s_q = sample_t'(aq * MU + $urandom_range(0, MU - 2) - (MU / 2 - 1));
    strobe = 1;
    t0 = cycle;
    @(negedge clk); strobe = 0;
    check(sym_valid == 1, "sym_valid one clock after strobe");
    check(sym_bits == b, $sformatf("%s bits %b got %b (s=%0d,%0d)", m.name(), b, sym_bits, s_i, s_q));
    check(32'(rec_i) == ai * MU && (!two_dim(m) || 32'(rec_q) == aq * MU), "recovered amplitude");
    for (int c = 0; c < sps(m) + 2; c++) begin
      @(posedge clk); #1;
      if (bit_valid) begin got.push_back(bit_o); tb.push_back(cycle - t0); end
    end
    check(got.size() == k, $sformatf("%0d serial bits", k));
    for (int i = 0; i < got.size() && i < k; i++) begin
      check(got[i] == b[k - 1 - i], "serial bit order");
      check(tb[i] == 3 + i * SPB, $sformatf("serial bit %0d at clock %0d", i, tb[i]));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      mode = mod_t'(m);
      repeat (50) one_symbol(mod_t'(m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
