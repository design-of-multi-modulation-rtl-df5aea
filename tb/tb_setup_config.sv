// tb_setup_config: programs a table of four words of different lengths to
// the three devices and checks, from the SPI pins alone, that each device's
// enable is low for exactly its words, that the bits sampled on the rising
// serial clock edges reproduce the words MSB first, that each serial clock
// half period lasts DIV clocks, and that done rises after the last word.
module tb_setup_config;
  localparam int NW = 4, DIV = 3;
  localparam logic [NW-1:0][39:0] W = {
    {2'd2, 6'd16, 32'h0000_A5C3},
    {2'd1, 6'd8,  32'h0000_003C},
    {2'd1, 6'd16, 32'h0000_8E01},
    {2'd0, 6'd32, 32'hDEAD_BEEF}
  };
  logic clk = 0, rst_n = 0, sclk, sdata, done;
  logic [2:0] cs_n;
  int checks = 0, failures = 0;

  setup_config #(.NW(NW), .DIV(DIV), .WORDS(W)) dut (.*);
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

  // monitor
  int word_n = 0, nb = 0, dev = -1, hp = 0, bad_hp = 0;
  logic [31:0] acc;
  logic sclk_d = 0, busy_d = 0;
  always @(posedge clk) if (rst_n) begin
    logic busy;
    busy = (cs_n != 3'b111);
    if (sclk != sclk_d) begin
      if (hp != DIV) bad_hp++;
      hp = 1;
    end else hp++;
    if (busy && !busy_d) begin
      nb = 0; acc = '0;
      dev = (cs_n == 3'b110) ? 0 : (cs_n == 3'b101) ? 1 : (cs_n == 3'b011) ? 2 : -1;
      hp = 1;
    end
    if (busy && sclk && !sclk_d) begin acc = {acc[30:0], sdata}; nb++; end
    if (!busy && busy_d) begin
      check(word_n < NW, "no extra word");
      if (word_n < NW) begin
        check(dev == int'(W[word_n][39:38]), $sformatf("word %0d device %0d", word_n, dev));
        check(nb == int'(W[word_n][37:32]), $sformatf("word %0d length %0d", word_n, nb));
        check(acc == (W[word_n][31:0] & (32'hFFFF_FFFF >> (32 - nb))), $sformatf("word %0d value %h", word_n, acc));
      end
      word_n++;
    end
    sclk_d <= sclk;
    busy_d <= busy;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(done == 0, "not done at start");
    wait (done);
    repeat (5) @(posedge clk);
    check(word_n == NW, $sformatf("%0d words sent", word_n));
    check(bad_hp == 0, "serial clock half period is DIV clocks");
    check(cs_n == 3'b111 && sclk == 0, "idle after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
