// prbg: pseudo-random bit generator, the message source of the modulator.
//
// A Fibonacci linear-feedback shift register of M stages (default 9) with
// feedback polynomial x^9 + x^5 + 1 (taps TAP_A and TAP_B). Each cycle that
// `en` is high the register shifts by one and `bit_o` presents the bit that
// leaves the last stage; `bit_valid` marks that cycle's bit one cycle later.
// The seed is loaded from `seed` (the 9-bit switch value) while `load` is high
// or in reset; an all-zero seed, which would lock the register, is replaced
// by all ones. The use of an LFSR and a 9-bit switch value follow the design;
// the polynomial and the zero-seed rule are choices of this implementation.
// Timing: bit_o/bit_valid are registered, one bit per enabled cycle.
module prbg #(
  parameter int M     = 9,
  parameter int TAP_A = 9,
  parameter int TAP_B = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [M-1:0] seed,
  input  logic         en,
  output logic         bit_o,
  output logic         bit_valid
);
  logic [M-1:0] sr;
  logic [M-1:0] seed_nz;
  logic         fb;

  assign seed_nz = (seed == '0) ? '1 : seed;
  assign fb      = sr[TAP_A-1] ^ sr[TAP_B-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr        <= '1;
      bit_o     <= 1'b0;
      bit_valid <= 1'b0;
    end else if (load) begin
      sr        <= seed_nz;
      bit_valid <= 1'b0;
    end else begin
      bit_valid <= en;
      if (en) begin
        bit_o <= sr[M-1];
        sr    <= {sr[M-2:0], fb};
      end
    end
  end
endmodule
