// psf_interp: multi-rate polyphase interpolation FIR, the pulse-shaping
// filter (PSF).
//
// Symbols enter at the symbol rate (sym_valid/sym) and one output sample
// leaves every clock, so the filter raises the rate by L = sps(mode), which
// changes with the modulation (4, 8, 8, 16 by default). The length SPAN*L+1
// prototype filter is split into L polyphase branches of SPAN+1 taps:
//   y[m*L + p] = sum_{j=0..SPAN} x[m-j] * h[j*L + p],   p = 0 .. L-1
// A symbol delay line of SPAN+1 words, a phase counter p reset by every new
// symbol, a coefficient table indexed by (mode, j, p) and SPAN+1 multipliers
// realise it. IS_RC = 0 gives the root-raised cosine filter of the modulator;
// IS_RC = 1 gives the raised cosine filter that reshapes recovered symbols in
// the demodulator. The use of a polyphase RRC/RC interpolator whose rate
// follows the modulation is the design's; span, roll-off, widths and the
// single-cycle multiply-add tree are this implementation's choices.
// Timing: the output y is registered; the first sample of a symbol appears
// two clocks after its sym_valid.
module psf_interp
  import mmbmd_pkg::*;
#(
  parameter bit IS_RC = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  mod_t    mode,
  input  logic    sym_valid,
  input  sample_t sym,
  output sample_t y
);
  localparam int CF = IS_RC ? CF_RC : CF_RRC;

  localparam int NT = 4 * (SPAN + 1) * LMAX;
  typedef coef_t tbl_t [NT];

  function automatic tbl_t mk_tbl();
    tbl_t t;
    for (int m = 0; m < 4; m++)
      for (int j = 0; j <= SPAN; j++)
        for (int p = 0; p < LMAX; p++)
          t[(m * (SPAN + 1) + j) * LMAX + p] = (p < sps(mod_t'(m)))
                       ? coef_t'(coef_l(IS_RC, sps(mod_t'(m)), j * sps(mod_t'(m)) + p))
                       : '0;
    return t;
  endfunction

  localparam tbl_t TBL = mk_tbl();

  sample_t                   x [SPAN+1];
  logic [$clog2(LMAX)-1:0]   p;
  logic signed [47:0]        acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j <= SPAN; j++) x[j] <= '0;
      p  <= '0;
    end else begin
      if (sym_valid) begin
        x[0] <= sym;
        for (int j = 1; j <= SPAN; j++) x[j] <= x[j-1];
        p <= '0;
      end else if (32'(p) < sps(mode) - 1) begin
        p <= p + 1'b1;
      end
    end
  end

  always_comb begin
    acc = '0;
    for (int j = 0; j <= SPAN; j++)
      acc += 48'(x[j]) * 48'(TBL[(32'(mode) * (SPAN + 1) + j) * LMAX + 32'(p)]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y     <= '0;
    end else begin
      y     <= sat((acc + (48'sd1 <<< (CF - 1))) >>> CF);
    end
  end
endmodule
