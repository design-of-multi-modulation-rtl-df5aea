// setup_config: setup configuration of the converters and the board clock
// synthesizer over serial programming interfaces (SPI).
//
// After reset the module writes NW serial words, one after another, taken
// from the WORDS table: each entry names a target device (0 = clock
// synthesizer, 1 = DAC, 2 = ADC), a word length in bits (up to 32) and the
// word, sent most significant bit first. The shared serial clock idles low;
// the data bit changes while sclk is low and is stable across the rising
// edge; each half period lasts DIV clocks. The target's active-low enable
// cs_n[dev] is low for the whole word, and high for at least one half period
// between words. When the last word is sent `done` rises and stays high; the
// modulator and demodulator are held idle until then. Configuring the ADC,
// DAC and clock synthesizer over SPI before the modem runs is the design's;
// the serial format, the table layout and the default table (address 0,
// data 0 placeholders, to be replaced by the register values of the actual
// parts) are this implementation's choices.
module setup_config #(
  parameter int NW  = 3,
  parameter int DIV = 4,
  parameter logic [NW-1:0][39:0] WORDS = {
    // {dev[1:0], nbits[5:0], word[31:0]}
    {2'd2, 6'd16, 32'h0000_0000},   // ADC: 16-bit word
    {2'd1, 6'd16, 32'h0000_0000},   // DAC: instruction byte + data byte
    {2'd0, 6'd32, 32'h0000_0000}    // clock synthesizer: 32-bit word
  }
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       sclk,
  output logic       sdata,
  output logic [2:0] cs_n,
  output logic       done
);
  typedef enum logic [1:0] {S_LOAD, S_LOW, S_HIGH, S_GAP} state_t;

  state_t                  st;
  logic [$clog2(NW+1)-1:0] widx;
  logic [5:0]              nleft;
  logic [31:0]             sh;
  logic [$clog2(DIV+1)-1:0] div;
  logic                    half_end;

  assign half_end = (32'(div) == DIV - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_LOAD;
      widx  <= '0;
      nleft <= '0;
      sh    <= '0;
      div   <= '0;
      sclk  <= 1'b0;
      sdata <= 1'b0;
      cs_n  <= '1;
      done  <= 1'b0;
    end else begin
      unique case (st)
        S_LOAD: begin
          if (32'(widx) == NW) begin
            done <= 1'b1;
          end else begin
            nleft <= WORDS[widx][37:32];
            // left-align the word so its first bit sits in sh[31]
            sh    <= WORDS[widx][31:0] << (6'd32 - WORDS[widx][37:32]);
            sdata <= WORDS[widx][6'(WORDS[widx][37:32] - 6'd1)];
            cs_n  <= ~(3'b001 << WORDS[widx][39:38]);
            div   <= '0;
            st    <= S_LOW;
          end
        end
        S_LOW: begin
          div <= half_end ? '0 : div + 1'b1;
          if (half_end) begin
            sclk <= 1'b1;
            st   <= S_HIGH;
          end
        end
        S_HIGH: begin
          div <= half_end ? '0 : div + 1'b1;
          if (half_end) begin
            sclk  <= 1'b0;
            nleft <= nleft - 1'b1;
            sh    <= sh << 1;
            if (nleft == 6'd1) begin
              cs_n <= '1;
              st   <= S_GAP;
            end else begin
              sdata <= sh[30];
              st    <= S_LOW;
            end
          end
        end
        S_GAP: begin
          div <= half_end ? '0 : div + 1'b1;
          if (half_end) begin
            widx <= widx + 1'b1;
            st   <= S_LOAD;
          end
        end
      endcase
    end
  end

  // at most one device is enabled at a time, and only while a word is sent
  a_one_target: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(~cs_n) && (done -> cs_n == '1));
endmodule
