// bpm_channel: the processing chain of one RF channel, from raw ADC samples
// to the signal amplitude.
//
// Amplitude-imbalance scaling (gain_scaler), digital downconversion (ddc) and
// CORDIC magnitude (cordic_amp) in a row, as in the design description, which
// replicates this chain once per button. The baseband I/Q pair is brought out
// as well for diagnostics.
// Timing: amp_valid follows each DDC output by the CORDIC latency (20 clocks).
module bpm_channel
  import bpm_pkg::*;
#(
  parameter int FIR_MAX_TAPS = 1024
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              adc_valid,
  input  adc_t              adc,
  input  logic [GAIN_W-1:0] gain,
  input  ddc_cfg_t          cfg,
  input  coef_wr_t          coef,
  output logic              iq_valid,
  output data_t             i_o,
  output data_t             q_o,
  output logic              amp_valid,
  output amp_t              amp,
  output logic              overrun
);
  logic sc_v;
  adc_t sc_x;

  gain_scaler u_gain (
    .clk, .rst, .valid_i(adc_valid), .x(adc), .gain, .valid_o(sc_v), .y(sc_x)
  );

  ddc #(.FIR_MAX_TAPS(FIR_MAX_TAPS)) u_ddc (
    .clk, .rst, .valid_i(sc_v), .x(sc_x), .cfg, .coef,
    .valid_o(iq_valid), .i_o, .q_o, .overrun
  );

  cordic_amp u_cordic (
    .clk, .rst, .valid_i(iq_valid), .i_i(i_o), .q_i(q_o), .valid_o(amp_valid), .amp
  );
endmodule
