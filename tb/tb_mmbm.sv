// tb_mmbm: runs the modulator in every mode from a seed and checks, against
// models kept in the testbench: the bit stream (x^9+x^5+1 from the seed, one
// bit every SPB clocks), each symbol (Gray-mapped from the last k bits, one
// every L clocks) and every shaped output sample on I and Q (the symbols
// zero-stuffed to L samples per symbol and convolved with the RRC taps,
// rounded like the filter).
module tb_mmbm;
  import mmbmd_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  mod_t mode = MOD_BPSK;
  logic [8:0] seed = 9'h1A5;
  sample_t tx_i, tx_q, sym_i, sym_q;
  logic tx_bit, tx_bit_valid, sym_valid;
  int checks = 0, failures = 0;

  mmbm dut (.*);
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

  int lv4 [4] = '{-3, -1, 3, 1};

  task automatic run_mode(mod_t m, logic [8:0] sd, int nsym);
    automatic int l = sps(m), k = bits_per_sym(m);
    automatic logic [8:0] r = sd;
    automatic bit bits [$];
    automatic longint si [$], sq [$], take [$];
    automatic int pc = 0, last_bit = -1, last_sym = -1, bad_bit_gap = 0, bad_sym_gap = 0;
    automatic int nbit = 0, nchk = 0;
    @(negedge clk);
    run = 0; mode = m; seed = sd; rst_n = 0;   // restart, as on a mode switch
    @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    run = 1;
    while (si.size() < nsym) begin
      @(posedge clk); #1;
      pc++;
      if (tx_bit_valid) begin
        check(tx_bit == r[8], "bit follows x^9+x^5+1 from the seed");
        r = {r[7:0], r[8] ^ r[4]};
        bits.push_back(tx_bit);
        if (last_bit >= 0 && pc - last_bit != SPB) bad_bit_gap++;
        last_bit = pc;
      end
      if (sym_valid) begin
        automatic int n = bits.size(), ei, eq;
        automatic logic [3:0] b = 0;
        for (int i = 0; i < k; i++) b[k - 1 - i] = bits[n - k + i];
        case (m)
          MOD_BPSK: begin ei = b[0] ? 1 : -1; eq = 0; end
          MOD_4PAM: begin ei = lv4[b[1:0]]; eq = 0; end
          MOD_QPSK: begin ei = b[1] ? 1 : -1; eq = b[0] ? 1 : -1; end
          default:  begin ei = lv4[b[3:2]]; eq = lv4[b[1:0]]; end
        endcase
        check(n == k * (si.size() + 1), "k bits per symbol");
        check(32'(sym_i) == ei * MU && 32'(sym_q) == eq * MU, $sformatf("%s symbol %0d", m.name(), si.size()));
        si.push_back(ei * MU);
        sq.push_back(eq * MU);
        take.push_back(pc + 1);   // the filters take it at the next edge
        if (last_sym >= 0 && pc - last_sym != l) bad_sym_gap++;
        last_sym = pc;
      end
      // shaped output registered at this edge: sample q of the latest symbol
      // taken at or before the previous edge
      begin
        automatic int n = take.size();
        while (n > 0 && int'(take[n - 1]) > pc - 1) n--;
        if (n > 0 && pc - 1 - int'(take[n - 1]) < l) begin
          automatic int q = pc - 1 - int'(take[n - 1]);
          automatic longint ai = 0, aq = 0;
          for (int j = 0; j <= SPAN && j < n; j++) begin
            ai += si[n - 1 - j] * coef_l(0, l, j * l + q);
            aq += sq[n - 1 - j] * coef_l(0, l, j * l + q);
          end
          ai = (ai + (64'sd1 <<< (CF_RRC - 1))) >>> CF_RRC;
          aq = (aq + (64'sd1 <<< (CF_RRC - 1))) >>> CF_RRC;
          check(longint'(tx_i) == ai && longint'(tx_q) == aq,
                $sformatf("%s shaped sample: %0d,%0d vs %0d,%0d", m.name(), tx_i, tx_q, ai, aq));
          nchk++;
        end
      end
    end
    check(bad_bit_gap == 0, "one bit every SPB clocks");
    check(bad_sym_gap == 0, "one symbol every L clocks");
    check(nchk > nsym * l / 2, "shaped samples checked");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_mode(MOD_BPSK,  9'h1A5, 60);
    run_mode(MOD_4PAM,  9'h0F3, 60);
    run_mode(MOD_QPSK,  9'h155, 60);
    run_mode(MOD_16QAM, 9'h0C7, 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
