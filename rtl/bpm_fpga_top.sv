// bpm_fpga_top: signal processing FPGA of a button beam position monitor.
//
// Four undersampled 500 MHz button signals arrive as 16-bit ADC samples (up
// to 160 MS/s, one sample per clock while adc_valid is high). Per channel, an
// AGC watches the raw level and sets the RFFE attenuation, and a processing
// chain scales the samples for channel imbalance, downconverts them with an
// NCO/mixer, CIC, compensation FIR and two programmable decimating FIRs, and
// takes the CORDIC amplitude. The amplitudes are corrected for the front-end
// temperature drift (feed-forward, from the RFFE sensor), swapped back to
// button order when the RFFE crossbar is in its crossed state, then turned
// into X/Y in single precision and the charge as a fixed-point integer.
// Positions are streamed out (for a feedback link), kept in registers and
// recorded into external DDR2; raw ADC data can be recorded into external QDR
// SRAM. All settings are registers on a simple bus from the system/control
// FPGA.
// This structure follows the design description; one clock for everything,
// the register bus and the memory ports are this design's choices. The
// memories themselves, the RFFE, the ADCs, the control-system interface and
// the feedback link are outside this module and connect through its ports.
// The channels' baseband I/Q, the AGC step pulses and the crossbar switch
// pulse are left unconnected here; the submodules provide them for testing
// and for extensions such as a phase readout. Raw-memory read addresses use
// only the low CAP_AW bits of the 32-bit register.
// Timing: pos_valid pulses once per r*2*dec1*dec2 ADC samples (4096 after
// reset), except for the samples blanked after a crossbar switch.
module bpm_fpga_top
  import bpm_pkg::*;
#(
  parameter int FIR_MAX_TAPS = 1024,
  parameter int CAP_AW       = 19,
  parameter int REC_AW       = 24,
  parameter int AGC_WIN_LOG2 = 16
) (
  input  logic              clk,
  input  logic              rst,
  // ADCs
  input  logic              adc_valid,
  input  adc_t              adc [N_CH],
  // register bus from the system FPGA
  input  logic              reg_wr,
  input  logic              reg_rd,
  input  logic [11:0]       reg_addr,
  input  logic [31:0]       reg_wdata,
  output logic              reg_rvalid,
  output logic [31:0]       reg_rdata,
  // RFFE control
  output logic [ATT_W-1:0]  rffe_atten [N_CH],
  output logic              xbar_swap,
  input  logic signed [15:0] rffe_temp,     // board temperature, Q8.8 degrees
  // QDR SRAM, raw ADC data
  output logic              qdr_we,
  output logic              qdr_re,
  output logic [CAP_AW-1:0] qdr_addr,
  output logic [63:0]       qdr_wdata,
  input  logic              qdr_rvalid,
  input  logic [63:0]       qdr_rdata,
  // DDR2 SDRAM, position history
  output logic              ddr_we,
  output logic [REC_AW-1:0] ddr_addr,
  output logic [127:0]      ddr_wdata,
  input  logic              ddr_ready,
  // position stream
  output logic              pos_valid,
  output logic [31:0]       pos_x,
  output logic [31:0]       pos_y,
  output logic [31:0]       charge
);
  ddc_cfg_t          ddc_cfg;
  coef_wr_t          coef;
  pos_cfg_t          pos_cfg;
  logic [GAIN_W-1:0] gain [N_CH];
  logic [ATT_W-1:0]  att_manual [N_CH];
  logic              cap_arm, cap_trig, rec_enable, agc_enable, xb_enable, tc_enable;
  logic signed [15:0] temp_ref;
  logic signed [23:0] tk [N_CH];
  logic [15:0]       xb_period, agc_hi, agc_lo;
  logic [7:0]        xb_blank;
  logic              cap_rd_req, cap_rd_valid, cap_busy, cap_done;
  logic [31:0]       cap_rd_addr;
  logic [63:0]       cap_rd_data;
  logic [REC_AW-1:0] rec_ptr;
  logic [31:0]       rec_dropped;

  // Per-channel AGC and processing chain
  amp_t        ch_amp [N_CH];
  logic        ch_amp_v [N_CH];
  logic [N_CH-1:0] ch_ovr;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic iq_v;
    data_t i_d, q_d;
    logic up, down;

    agc #(.WIN_LOG2(AGC_WIN_LOG2)) u_agc (
      .clk, .rst, .enable(agc_enable), .manual(att_manual[c]), .thr_hi(agc_hi), .thr_lo(agc_lo),
      .valid_i(adc_valid), .x(adc[c]), .atten(rffe_atten[c]), .step_up(up), .step_down(down)
    );

    bpm_channel #(.FIR_MAX_TAPS(FIR_MAX_TAPS)) u_chain (
      .clk, .rst, .adc_valid, .adc(adc[c]), .gain(gain[c]), .cfg(ddc_cfg), .coef,
      .iq_valid(iq_v), .i_o(i_d), .q_o(q_d),
      .amp_valid(ch_amp_v[c]), .amp(ch_amp[c]), .overrun(ch_ovr[c])
    );
  end

  // Temperature correction, per analog path
  logic tc_v;
  amp_t tc_amp [N_CH];

  temp_comp u_tc (
    .clk, .rst, .enable(tc_enable), .temp(rffe_temp), .temp_ref, .k(tk),
    .valid_i(ch_amp_v[0]), .amp_i(ch_amp), .valid_o(tc_v), .amp_o(tc_amp)
  );

  // Crossbar control and re-swap
  logic xb_v, xb_switched;
  amp_t btn_amp [N_CH];

  xbar_reswap u_xbar (
    .clk, .rst, .enable(xb_enable), .period(xb_period), .blank(xb_blank),
    .valid_i(tc_v), .amp_i(tc_amp), .valid_o(xb_v), .amp_o(btn_amp),
    .xbar_swap, .switched(xb_switched)
  );

  // Position and charge
  position_calc u_pos (
    .clk, .rst, .valid_i(xb_v), .amp(btn_amp), .cfg(pos_cfg),
    .valid_o(pos_valid), .x_f(pos_x), .y_f(pos_y), .charge
  );

  // Raw data recording
  adc_capture #(.AW(CAP_AW)) u_cap (
    .clk, .rst, .arm(cap_arm), .trigger(cap_trig), .valid_i(adc_valid),
    .data_i({adc[3], adc[2], adc[1], adc[0]}),
    .rd_req(cap_rd_req), .rd_addr(cap_rd_addr[CAP_AW-1:0]), .rd_valid(cap_rd_valid),
    .rd_data(cap_rd_data), .busy(cap_busy), .done(cap_done),
    .mem_we(qdr_we), .mem_re(qdr_re), .mem_addr(qdr_addr), .mem_wdata(qdr_wdata),
    .mem_rvalid(qdr_rvalid), .mem_rdata(qdr_rdata)
  );

  // Position history
  pos_recorder #(.AW(REC_AW)) u_rec (
    .clk, .rst, .enable(rec_enable), .valid_i(pos_valid), .x_f(pos_x), .y_f(pos_y), .charge,
    .mem_we(ddr_we), .mem_addr(ddr_addr), .mem_wdata(ddr_wdata), .mem_ready(ddr_ready),
    .wr_ptr(rec_ptr), .dropped(rec_dropped)
  );

  // Registers
  bpm_regs u_regs (
    .clk, .rst, .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rvalid, .reg_rdata,
    .ddc_cfg, .coef, .gain, .att_manual, .pos_cfg, .cap_arm, .cap_trig, .rec_enable,
    .agc_enable, .xb_enable, .tc_enable, .temp_ref, .tk, .xb_period, .xb_blank, .agc_hi, .agc_lo,
    .cap_rd_req, .cap_rd_addr,
    .cap_done, .cap_busy, .cap_rd_valid, .cap_rd_data, .fir_overrun(|ch_ovr),
    .xbar_state(xbar_swap), .pos_valid, .pos_x, .pos_y, .charge, .amp(btn_amp), .att(rffe_atten),
    .rec_ptr(32'(rec_ptr)), .rec_dropped, .temp(rffe_temp)
  );
endmodule
