// matched_filter: multi-rate root-raised cosine matched filter (MF) with an
// odd number of symmetric taps.
//
// One sample enters and one leaves every clock. The RRC response for the
// current samples-per-symbol L = sps(mode) has SPAN*L+1 taps; all modes are
// held centred in one NMAX-tap window (NMAX = SPAN*LMAX+1), shorter responses
// padded with zeros at both ends, so the group delay is (NMAX-1)/2 samples in
// every mode. Because the response is symmetric, the two samples that share
// a coefficient are added first ("folded" form), which halves the
// multipliers to (NMAX+1)/2. The taps are the same unit-energy RRC taps the
// transmit filter uses, so the cascade has unit gain at the symbol peak.
// Using an RRC matched filter with an odd symmetric tap count whose length
// follows the modulation is the design's; the folded direct form, span,
// roll-off and widths are this implementation's choices.
// Timing: y is registered; total latency from x to the centre of the
// response is (NMAX-1)/2 + 1 clocks.
module matched_filter
  import mmbmd_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  mod_t    mode,
  input  sample_t x,
  output sample_t y
);
  localparam int C  = (NMAX - 1) / 2;    // centre tap
  localparam int NT = 4 * (C + 1);

  typedef coef_t tbl_t [NT];

  // table[m*(C+1) + d]: tap at distance d from the centre for mode m
  function automatic tbl_t mk_tbl();
    tbl_t t;
    int l;
    for (int m = 0; m < 4; m++) begin
      l = sps(mod_t'(m));
      for (int d = 0; d <= C; d++)
        t[m * (C + 1) + d] = (d <= SPAN * l / 2) ? coef_t'(coef_l(1'b0, l, SPAN * l / 2 - d)) : '0;
    end
    return t;
  endfunction

  localparam tbl_t TBL = mk_tbl();

  sample_t            dl [NMAX];
  logic signed [47:0] acc;
  logic signed [DW:0] pre;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NMAX; i++) dl[i] <= '0;
    end else begin
      dl[0] <= x;
      for (int i = 1; i < NMAX; i++) dl[i] <= dl[i-1];
    end
  end

  always_comb begin
    acc = 48'(dl[C]) * 48'(TBL[32'(mode) * (C + 1)]);
    for (int d = 1; d <= C; d++) begin
      pre = (DW+1)'(dl[C-d]) + (DW+1)'(dl[C+d]);
      acc += 48'(pre) * 48'(TBL[32'(mode) * (C + 1) + d]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= sat((acc + (48'sd1 <<< (CF_RRC - 1))) >>> CF_RRC);
  end
endmodule
