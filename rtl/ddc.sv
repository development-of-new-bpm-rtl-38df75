// ddc: digital downconverter of one RF channel.
//
// The undersampled IF signal is mixed with the NCO's cosine and sine, and the
// I and Q products each pass the same filter cascade: 5th-order CIC
// (decimation 4..32), 8th-order compensation FIR (decimation 2), FIR1 and
// FIR2 (up to 1024 taps, decimation 1..16 each, run-time coefficients,
// taps = 1 bypasses). The total decimation is therefore 8..16384, i.e. an
// output rate from 20 MHz down to 9.77 kHz at 160 MHz. This chain is the one
// of the design description; all settings in `cfg` may be changed while
// running and coefficient writes in `coef` go to FIR1 or FIR2 of both paths.
// The ADC sample is delayed to meet the NCO's pipeline, so the mixer sees the
// oscillator value for the same sample.
// Timing: valid_o marks each decimated I/Q pair; overrun pulses when a FIR
// order exceeds its cycle budget.
module ddc
  import bpm_pkg::*;
#(
  parameter int FIR_MAX_TAPS = 1024,
  parameter int NCO_STAGES   = 18
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     valid_i,
  input  adc_t     x,
  input  ddc_cfg_t cfg,
  input  coef_wr_t coef,
  output logic     valid_o,
  output data_t    i_o,
  output data_t    q_o,
  output logic     overrun
);
  localparam int NCO_LAT = NCO_STAGES + 2;
  localparam int CA      = $clog2(FIR_MAX_TAPS);

  // NCO and matching delay of the sample
  logic                     nco_v;
  logic signed [TRIG_W-1:0] c, s;
  adc_t                     xd [NCO_LAT];

  nco #(.STAGES(NCO_STAGES)) u_nco (
    .clk, .rst, .valid_i, .fcw(cfg.nco_fcw), .valid_o(nco_v), .cos_o(c), .sin_o(s)
  );

  always_ff @(posedge clk) begin
    xd[0] <= x;
    for (int n = 1; n < NCO_LAT; n++) xd[n] <= xd[n-1];
  end

  logic                    mix_v;
  logic signed [MIX_W-1:0] mix_i, mix_q;

  iq_mixer u_mix (
    .clk, .rst, .valid_i(nco_v), .x(xd[NCO_LAT-1]), .cos_i(c), .sin_i(s),
    .valid_o(mix_v), .i_o(mix_i), .q_o(mix_q)
  );

  // Filter cascade, path 0 = I, path 1 = Q
  logic signed [MIX_W-1:0] p_in [2];
  data_t p_cic [2], p_cmp [2], p_f1 [2], p_f2 [2];
  logic  v_cic [2], v_cmp [2], v_f1 [2], v_f2 [2], ov1 [2], ov2 [2];

  assign p_in[0] = mix_i;
  assign p_in[1] = mix_q;

  for (genvar p = 0; p < 2; p++) begin : g_path
    cic_decim u_cic (
      .clk, .rst, .valid_i(mix_v), .x(p_in[p]), .r(cfg.cic_r), .shift(cfg.cic_shift),
      .valid_o(v_cic[p]), .y(p_cic[p])
    );
    comp_fir u_cmp (
      .clk, .rst, .valid_i(v_cic[p]), .x(p_cic[p]), .valid_o(v_cmp[p]), .y(p_cmp[p])
    );
    fir_decim #(.MAX_TAPS(FIR_MAX_TAPS)) u_fir1 (
      .clk, .rst, .valid_i(v_cmp[p]), .x(p_cmp[p]), .dec(cfg.fir1_dec), .taps(cfg.fir1_taps),
      .coef_we(coef.we && !coef.sel), .coef_addr(CA'(coef.addr)), .coef_data(coef.data),
      .valid_o(v_f1[p]), .y(p_f1[p]), .overrun(ov1[p])
    );
    fir_decim #(.MAX_TAPS(FIR_MAX_TAPS)) u_fir2 (
      .clk, .rst, .valid_i(v_f1[p]), .x(p_f1[p]), .dec(cfg.fir2_dec), .taps(cfg.fir2_taps),
      .coef_we(coef.we && coef.sel), .coef_addr(CA'(coef.addr)), .coef_data(coef.data),
      .valid_o(v_f2[p]), .y(p_f2[p]), .overrun(ov2[p])
    );
  end

  assign valid_o = v_f2[0];
  assign i_o     = p_f2[0];
  assign q_o     = p_f2[1];
  assign overrun = ov1[0] | ov1[1] | ov2[0] | ov2[1];
endmodule
