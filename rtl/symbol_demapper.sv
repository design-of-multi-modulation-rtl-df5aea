// symbol_demapper: configurable hard-decision symbol demapper for BPSK, 4-PAM,
// QPSK and 16-QAM, with a parallel-to-serial bit output.
//
// At each strobe from timing recovery the I (and, in QPSK/16-QAM, Q) symbol
// sample is sliced: two-level decisions at 0, four-level decisions at 0 and
// +-THR (THR = 2*MU, halfway between the amplitudes MU and 3*MU, as the
// transmit/matched filter cascade has unit gain). Each decision is Gray
// decoded exactly inverse to symbol_mapper, giving k bits (first bit in the
// MSB of sym_bits[k-1:0]) and the ideal amplitudes rec_i/rec_q that feed the
// raised cosine re-shaping filter. The k bits are then shifted out serially,
// one every SPB clocks, so the recovered stream has the bit rate of the
// transmitter. Hard decisions and Gray demapping follow the design; the
// thresholds, bit order and serial timing are this implementation's choices.
// Timing: sym_valid/sym_bits/rec_* one clock after strobe; the first
// serial bit of a symbol one clock after sym_valid, then every SPB clocks.
module symbol_demapper
  import mmbmd_pkg::*;
#(
  parameter int SCALE = MU
) (
  input  logic            clk,
  input  logic            rst_n,
  input  mod_t            mode,
  input  logic            strobe,
  input  sample_t         s_i,
  input  sample_t         s_q,
  output logic            sym_valid,
  output logic [KMAX-1:0] sym_bits,
  output sample_t         rec_i,
  output sample_t         rec_q,
  output logic            bit_valid,
  output logic            bit_o
);
  localparam int THR = 2 * SCALE;

  logic [1:0]        gi4, gq4;
  logic              gi2, gq2;
  logic [KMAX-1:0]   bits;
  logic signed [3:0] ai, aq;
  logic [KMAX-1:0]   sh;
  logic [2:0]        nleft;
  logic [$clog2(SPB)-1:0] tick;

  // Gray four-level slicer: -3 -> 00, -1 -> 01, +1 -> 11, +3 -> 10
  function automatic logic [1:0] slice4(sample_t v);
    if (32'(v) < -THR)      return 2'b00;
    else if (v < 0)         return 2'b01;
    else if (32'(v) < THR)  return 2'b11;
    else                    return 2'b10;
  endfunction

  function automatic logic signed [3:0] lvl4(logic [1:0] g);
    case (g)
      2'b00:   return -4'sd3;
      2'b01:   return -4'sd1;
      2'b11:   return  4'sd1;
      default: return  4'sd3;
    endcase
  endfunction

  assign gi4 = slice4(s_i);
  assign gq4 = slice4(s_q);
  assign gi2 = (s_i >= 0);
  assign gq2 = (s_q >= 0);

  always_comb begin
    bits = '0;
    ai   = '0;
    aq   = '0;
    case (mode)
      MOD_BPSK:  begin bits = {3'b000, gi2};  ai = gi2 ? 4'sd1 : -4'sd1; end
      MOD_4PAM:  begin bits = {2'b00, gi4};   ai = lvl4(gi4); end
      MOD_QPSK:  begin bits = {2'b00, gi2, gq2};
                       ai = gi2 ? 4'sd1 : -4'sd1; aq = gq2 ? 4'sd1 : -4'sd1; end
      default:   begin bits = {gi4, gq4}; ai = lvl4(gi4); aq = lvl4(gq4); end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_valid <= 1'b0;
      sym_bits  <= '0;
      rec_i     <= '0;
      rec_q     <= '0;
      sh        <= '0;
      nleft     <= '0;
      tick      <= '0;
      bit_valid <= 1'b0;
      bit_o     <= 1'b0;
    end else begin
      sym_valid <= strobe;
      bit_valid <= 1'b0;
      if (strobe) begin
        sym_bits <= bits;
        rec_i    <= sample_t'(ai * SCALE);
        rec_q    <= sample_t'(aq * SCALE);
      end
      if (sym_valid) begin
        // load the k decided bits, MSB first, and emit the first one now
        sh        <= sym_bits << (KMAX - bits_per_sym(mode));
        nleft     <= 3'(bits_per_sym(mode));
        tick      <= '0;
      end else if (nleft != 0) begin
        tick <= (32'(tick) == SPB - 1) ? '0 : tick + 1'b1;
        if (tick == '0) begin
          bit_valid <= 1'b1;
          bit_o     <= sh[KMAX-1];
          sh        <= sh << 1;
          nleft     <= nleft - 1'b1;
        end
      end
    end
  end
endmodule
