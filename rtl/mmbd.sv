// mmbd: multi-modulation baseband demodulator.
//
// Chain: ADC samples (I and Q, ADC_W bits, one per clock) -> two RRC matched
// filters -> symbol timing recovery (Gardner error, timing index n_opt) ->
// symbol demapper (hard decisions, Gray decoding, serial bits) -> two raised
// cosine interpolating filters that re-shape the recovered symbols into a
// clean waveform for a DAC. The ADC word is placed in the upper bits of the
// DW-bit sample. `mode` selects the modulation; the demodulator must be reset
// when it changes. The chain is the design's; the widths, the ADC word
// alignment and the internal structures are this implementation's choices
// (see each block).
// Timing: matched filter latency (NMAX-1)/2 + 1 clocks to the pulse centre,
// one clock in timing recovery, one in the demapper, then the serial bits.
module mmbd
  import mmbmd_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  mod_t                    mode,
  input  logic signed [ADC_W-1:0] adc_i,
  input  logic signed [ADC_W-1:0] adc_q,
  output sample_t                 mf_i,
  output sample_t                 mf_q,
  output logic                    sym_valid,
  output logic [KMAX-1:0]         sym_bits,
  output logic                    rx_bit,
  output logic                    rx_bit_valid,
  output sample_t                 rc_i,
  output sample_t                 rc_q,
  output logic [$clog2(LMAX)-1:0] n_opt,
  output logic                    locked,
  output logic                    step_early,
  output logic                    step_late
);
  sample_t x_i, x_q, s_i, s_q, rec_i, rec_q;
  logic    strobe;

  assign x_i = sample_t'(adc_i) <<< (DW - ADC_W);
  assign x_q = sample_t'(adc_q) <<< (DW - ADC_W);

  matched_filter u_mf_i (.clk, .rst_n, .mode, .x(x_i), .y(mf_i));
  matched_filter u_mf_q (.clk, .rst_n, .mode, .x(x_q), .y(mf_q));

  timing_recovery u_str (
    .clk, .rst_n, .mode, .y_i(mf_i), .y_q(mf_q),
    .strobe, .s_i, .s_q, .n_opt, .locked, .step_early, .step_late
  );

  symbol_demapper u_demap (
    .clk, .rst_n, .mode, .strobe, .s_i, .s_q,
    .sym_valid, .sym_bits, .rec_i, .rec_q,
    .bit_valid(rx_bit_valid), .bit_o(rx_bit)
  );

  psf_interp #(.IS_RC(1'b1)) u_rc_i (
    .clk, .rst_n, .mode, .sym_valid, .sym(rec_i), .y(rc_i)
  );

  psf_interp #(.IS_RC(1'b1)) u_rc_q (
    .clk, .rst_n, .mode, .sym_valid, .sym(rec_q), .y(rc_q)
  );
endmodule
