// mmbm: multi-modulation baseband modulator.
//
// Chain: pseudo-random bit generator -> symbol mapper -> two root-raised
// cosine interpolating pulse-shaping filters (I and Q arm). A small
// controller counts the samples of a symbol (0 .. L-1, L = sps(mode)) and
// issues one bit request every SPB samples and one symbol tick at the last
// sample, so every modulation runs at the same bit rate and the shaped
// output runs at one sample per clock. While `run` is low the controller is
// cleared and the bit generator reloads its seed; raising `run` starts the
// modulation from the seed. The chain and the configurable modulations and
// interpolation rates are the design's; the controller and the equal bit
// rate across modulations are this implementation's choices.
// Timing: tx_i/tx_q change every clock; a bit requested at controller count
// c appears on tx_bit with tx_bit_valid at c+1; its symbol enters the
// filters at the next symbol tick and reaches the centre of the shaped
// pulse SPAN/2 symbols plus two clocks after that.
module mmbm
  import mmbmd_pkg::*;
#(
  parameter int SEED_W = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  mod_t              mode,
  input  logic [SEED_W-1:0] seed,
  output sample_t           tx_i,
  output sample_t           tx_q,
  output logic              tx_bit,
  output logic              tx_bit_valid,
  output sample_t           sym_i,
  output sample_t           sym_q,
  output logic              sym_valid
);
  logic [$clog2(LMAX)-1:0] cnt;
  logic bit_en, sym_tick, started, go;

  // `started` delays the start by one clock after reset so that the bit
  // generator always loads the seed before the first bit
  assign go       = run && started;
  assign bit_en   = go && (32'(cnt) % SPB == 0);
  assign sym_tick = go && (32'(cnt) == sps(mode) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) started <= 1'b0;
    else        started <= run;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           cnt <= '0;
    else if (!go)                         cnt <= '0;
    else if (32'(cnt) >= sps(mode) - 1)   cnt <= '0;
    else                                  cnt <= cnt + 1'b1;
  end

  prbg #(.M(SEED_W)) u_prbg (
    .clk, .rst_n, .load(!go), .seed, .en(bit_en),
    .bit_o(tx_bit), .bit_valid(tx_bit_valid)
  );

  symbol_mapper u_map (
    .clk, .rst_n, .mode, .bit_valid(tx_bit_valid), .bit_i(tx_bit),
    .sym_tick, .sym_i, .sym_q, .sym_valid
  );

  psf_interp #(.IS_RC(1'b0)) u_psf_i (
    .clk, .rst_n, .mode, .sym_valid, .sym(sym_i), .y(tx_i)
  );

  psf_interp #(.IS_RC(1'b0)) u_psf_q (
    .clk, .rst_n, .mode, .sym_valid, .sym(sym_q), .y(tx_q)
  );
endmodule
