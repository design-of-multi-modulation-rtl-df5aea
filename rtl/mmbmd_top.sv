// mmbmd_top: configurable multi-modulation baseband modulator and demodulator
// with setup configuration, the integrated design.
//
// After reset, setup_config programs the clock synthesizer, the DAC and the
// ADC over SPI. When it is done the modulator (mmbm) starts: pseudo-random
// bits are mapped to BPSK, 4-PAM, QPSK or 16-QAM symbols (selected by the
// 2-bit switch mod_sel) and RRC pulse-shaped to the DAC outputs dac_i/dac_q.
// The demodulator (mmbd) takes ADC samples adc_i/adc_q, matched-filters
// them, recovers symbol timing, decides symbols and bits (rx_bit) and
// re-shapes the recovered symbols with an RC filter to rc_i/rc_q. The 9-bit
// switch `seed` seeds the bit generator. The converters and the clock
// synthesizer are external parts: their data and SPI pins are the top's
// ports, and the channel from DAC to ADC lies outside. Changing mod_sel is a
// mode switch: the new mode is registered and the modulator and demodulator
// are restarted for one clock with it. The block chain is the design's; the
// restart rule and the shared mode for transmit and receive are this
// implementation's choices.
// Timing: one baseband sample per clock on every data port.
module mmbmd_top
  import mmbmd_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [1:0]              mod_sel,
  input  logic [8:0]              seed,
  // DAC (modulator output)
  output sample_t                 dac_i,
  output sample_t                 dac_q,
  // ADC (demodulator input)
  input  logic signed [ADC_W-1:0] adc_i,
  input  logic signed [ADC_W-1:0] adc_q,
  // demodulator results
  output logic                    rx_bit,
  output logic                    rx_bit_valid,
  output logic [KMAX-1:0]         rx_sym_bits,
  output logic                    rx_sym_valid,
  output sample_t                 rc_i,
  output sample_t                 rc_q,
  output logic [$clog2(LMAX)-1:0] n_opt,
  output logic                    locked,
  output logic                    step_early,
  output logic                    step_late,
  // transmitted bits, for comparison
  output logic                    tx_bit,
  output logic                    tx_bit_valid,
  // SPI setup of clock synthesizer (cs_n[0]), DAC (cs_n[1]) and ADC (cs_n[2])
  output logic                    spi_sclk,
  output logic                    spi_sdata,
  output logic [2:0]              spi_cs_n,
  output logic                    cfg_done,
  output mod_t                    mode
);
  logic    dp_rst_n;
  sample_t mf_i, mf_q, sym_i, sym_q;
  logic    sym_valid;

  setup_config u_cfg (
    .clk, .rst_n, .sclk(spi_sclk), .sdata(spi_sdata), .cs_n(spi_cs_n), .done(cfg_done)
  );

  // mode register and datapath restart
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode     <= MOD_BPSK;
      dp_rst_n <= 1'b0;
    end else begin
      mode     <= mod_t'(mod_sel);
      dp_rst_n <= cfg_done && (mod_t'(mod_sel) == mode);
    end
  end

  mmbm u_mmbm (
    .clk, .rst_n(dp_rst_n), .run(1'b1), .mode, .seed,
    .tx_i(dac_i), .tx_q(dac_q), .tx_bit, .tx_bit_valid,
    .sym_i, .sym_q, .sym_valid
  );

  mmbd u_mmbd (
    .clk, .rst_n(dp_rst_n), .mode, .adc_i, .adc_q,
    .mf_i, .mf_q, .sym_valid(rx_sym_valid), .sym_bits(rx_sym_bits),
    .rx_bit, .rx_bit_valid, .rc_i, .rc_q, .n_opt, .locked, .step_early, .step_late
  );
endmodule
