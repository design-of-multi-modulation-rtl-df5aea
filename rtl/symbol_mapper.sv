// symbol_mapper: configurable Gray-coded symbol mapper for BPSK, 4-PAM, QPSK
// and 16-QAM.
//
// Bits arrive serially (bit_valid/bit_i) and are collected in a 4-bit shift
// register (the bit combiner); the first bit of a symbol ends up as its most
// significant bit. On `sym_tick` the last k bits are mapped to the in-phase
// (I) and quadrature (Q) amplitudes A_sym = MU * A_i with A_i odd integers:
//   BPSK  : I = 0 -> -1, 1 -> +1;                Q = 0
//   4-PAM : I = Gray 00,01,11,10 -> -3,-1,+1,+3; Q = 0
//   QPSK  : I from the first bit, Q from the second, each +-1
//   16-QAM: I from the first two bits, Q from the last two, each 4-PAM Gray
// so QPSK and 16-QAM reuse the BPSK and 4-PAM one-dimensional maps on each
// axis. QPSK is placed on the diagonals (the PSK equation with a pi/4 phase
// offset). The amplitude rules and Gray coding follow the design; the bit
// order and the pi/4 offset are this implementation's choices.
// Timing: sym_i/sym_q/sym_valid are registered one cycle after sym_tick.
module symbol_mapper
  import mmbmd_pkg::*;
#(
  parameter int SCALE = MU
) (
  input  logic    clk,
  input  logic    rst_n,
  input  mod_t    mode,
  input  logic    bit_valid,
  input  logic    bit_i,
  input  logic    sym_tick,
  output sample_t sym_i,
  output sample_t sym_q,
  output logic    sym_valid
);
  logic [KMAX-1:0] sr, sr_next;
  logic signed [3:0] ai, aq;

  // Gray-coded 4-level amplitude
  function automatic logic signed [3:0] pam4(logic [1:0] b);
    case (b)
      2'b00:   return -4'sd3;
      2'b01:   return -4'sd1;
      2'b11:   return  4'sd1;
      default: return  4'sd3;
    endcase
  endfunction

  function automatic logic signed [3:0] pam2(logic b);
    return b ? 4'sd1 : -4'sd1;
  endfunction

  assign sr_next = bit_valid ? {sr[KMAX-2:0], bit_i} : sr;

  always_comb begin
    ai = '0;
    aq = '0;
    case (mode)
      MOD_BPSK:  ai = pam2(sr_next[0]);
      MOD_4PAM:  ai = pam4(sr_next[1:0]);
      MOD_QPSK:  begin ai = pam2(sr_next[1]);   aq = pam2(sr_next[0]);   end
      MOD_16QAM: begin ai = pam4(sr_next[3:2]); aq = pam4(sr_next[1:0]); end
      default:   ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr        <= '0;
      sym_i     <= '0;
      sym_q     <= '0;
      sym_valid <= 1'b0;
    end else begin
      sr        <= sr_next;
      sym_valid <= sym_tick;
      if (sym_tick) begin
        sym_i <= sample_t'(ai * SCALE);
        sym_q <= sample_t'(aq * SCALE);
      end
    end
  end
endmodule
