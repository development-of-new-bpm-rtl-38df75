// bpm_regs: control and read-back registers of the BPM firmware.
//
// Makes every run-time parameter of the signal-processing chain settable
// through a simple register bus: NCO frequency, CIC ratio and shift, FIR1/FIR2
// decimation, order and coefficients, channel gains, geometry and charge
// factors, crossbar and AGC settings, temperature correction, and the
// controls of the raw-data capture and the position recorder. It also returns positions, amplitudes and status.
// That the chain, the DDC and its FIR filters can be reconfigured at run time
// from the control system follows the design description; the bus and the
// address map (in bpm_pkg) are this design's choices.
// Bus: reg_wr or reg_rd for one clock with reg_addr (word address) and, for a
// write, reg_wdata. Read data is returned with reg_rvalid one clock later.
// Writes to 0x800..0xBFF / 0xC00..0xFFF load FIR1 / FIR2 coefficient
// (addr & 0x3FF) in all channels; capture arm/trigger are single-clock pulses
// written through bits 0/1 of REG_CTRL; a write to REG_CAP_ADDR starts a read
// of the raw-data memory. Reset values select a total decimation of 4096
// with FIR1/FIR2 bypassed, unity gains and 10 mm geometry factors.
module bpm_regs
  import bpm_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // register bus
  input  logic              reg_wr,
  input  logic              reg_rd,
  input  logic [11:0]       reg_addr,
  input  logic [31:0]       reg_wdata,
  output logic              reg_rvalid,
  output logic [31:0]       reg_rdata,
  // settings
  output ddc_cfg_t          ddc_cfg,
  output coef_wr_t          coef,
  output logic [GAIN_W-1:0] gain [N_CH],
  output logic [ATT_W-1:0]  att_manual [N_CH],
  output pos_cfg_t          pos_cfg,
  output logic              cap_arm,
  output logic              cap_trig,
  output logic              rec_enable,
  output logic              agc_enable,
  output logic              xb_enable,
  output logic              tc_enable,
  output logic signed [15:0] temp_ref,
  output logic signed [23:0] tk [N_CH],
  output logic [15:0]       xb_period,
  output logic [7:0]        xb_blank,
  output logic [15:0]       agc_hi,
  output logic [15:0]       agc_lo,
  output logic              cap_rd_req,
  output logic [31:0]       cap_rd_addr,
  // read-back
  input  logic              cap_done,
  input  logic              cap_busy,
  input  logic              cap_rd_valid,
  input  logic [63:0]       cap_rd_data,
  input  logic              fir_overrun,
  input  logic              xbar_state,
  input  logic              pos_valid,
  input  logic [31:0]       pos_x,
  input  logic [31:0]       pos_y,
  input  logic [31:0]       charge,
  input  amp_t              amp [N_CH],
  input  logic [ATT_W-1:0]  att [N_CH],
  input  logic [31:0]       rec_ptr,
  input  logic [31:0]       rec_dropped,
  input  logic signed [15:0] temp
);
  logic [31:0] x_l, y_l, q_l;
  logic [63:0] cap_l;
  logic        ovr_l;

  always_ff @(posedge clk) begin
    if (rst) begin
      ddc_cfg    <= '{nco_fcw: NCO_W'(1) << (NCO_W - 3),  // f_s / 8: 20 MHz at 160 MHz
                      cic_r: 6'd16, cic_shift: 6'd14,
                      fir1_dec: 5'd16, fir1_taps: 11'd1,
                      fir2_dec: 5'd8, fir2_taps: 11'd1};
      coef       <= '0;
      for (int c = 0; c < N_CH; c++) begin
        gain[c]       <= GAIN_W'(65536);
        att_manual[c] <= '0;
        tk[c]         <= '0;
      end
      pos_cfg    <= '{kx: 24'd655360, ky: 24'd655360, kq: 24'd65536};
      cap_arm    <= 1'b0;
      cap_trig   <= 1'b0;
      rec_enable <= 1'b0;
      agc_enable <= 1'b0;
      xb_enable  <= 1'b0;
      tc_enable  <= 1'b0;
      temp_ref   <= 16'sd6400;   // 25 degrees
      xb_period  <= 16'd1024;
      xb_blank   <= 8'd4;
      agc_hi     <= 16'd29491;   // 90 % of full scale
      agc_lo     <= 16'd13107;   // 40 % of full scale
      cap_rd_req <= 1'b0;
      cap_rd_addr <= '0;
      x_l <= '0; y_l <= '0; q_l <= '0; cap_l <= '0; ovr_l <= 1'b0;
      reg_rvalid <= 1'b0;
      reg_rdata  <= '0;
    end else begin
      cap_arm    <= 1'b0;
      cap_trig   <= 1'b0;
      cap_rd_req <= 1'b0;
      coef.we    <= 1'b0;
      if (pos_valid) begin
        x_l <= pos_x;
        y_l <= pos_y;
        q_l <= charge;
      end
      if (cap_rd_valid) cap_l <= cap_rd_data;
      if (fir_overrun)  ovr_l <= 1'b1;

      if (reg_wr) begin
        if (reg_addr[11]) begin
          coef <= '{we: 1'b1, sel: reg_addr[10], addr: reg_addr[9:0], data: reg_wdata[COEF_W-1:0]};
        end else begin
          unique case (reg_addr)
            REG_CTRL: begin
              cap_arm    <= reg_wdata[0];
              cap_trig   <= reg_wdata[1];
              rec_enable <= reg_wdata[2];
              agc_enable <= reg_wdata[3];
              xb_enable  <= reg_wdata[4];
              tc_enable  <= reg_wdata[5];
            end
            REG_NCO:       ddc_cfg.nco_fcw   <= reg_wdata[NCO_W-1:0];
            REG_CIC_R:     ddc_cfg.cic_r     <= reg_wdata[5:0];
            REG_CIC_SHIFT: ddc_cfg.cic_shift <= reg_wdata[5:0];
            REG_FIR1_DEC:  ddc_cfg.fir1_dec  <= reg_wdata[FIR_DEC_W-1:0];
            REG_FIR1_TAPS: ddc_cfg.fir1_taps <= reg_wdata[FIR_TAPS_W-1:0];
            REG_FIR2_DEC:  ddc_cfg.fir2_dec  <= reg_wdata[FIR_DEC_W-1:0];
            REG_FIR2_TAPS: ddc_cfg.fir2_taps <= reg_wdata[FIR_TAPS_W-1:0];
            REG_KX:        pos_cfg.kx        <= reg_wdata[23:0];
            REG_KY:        pos_cfg.ky        <= reg_wdata[23:0];
            REG_KQ:        pos_cfg.kq        <= reg_wdata[23:0];
            REG_XB_PERIOD: xb_period         <= reg_wdata[15:0];
            REG_XB_BLANK:  xb_blank          <= reg_wdata[7:0];
            REG_AGC_HI:    agc_hi            <= reg_wdata[15:0];
            REG_AGC_LO:    agc_lo            <= reg_wdata[15:0];
            REG_TEMP_REF:  temp_ref          <= reg_wdata[15:0];
            REG_STATUS:    ovr_l             <= 1'b0;   // any write clears the overrun flag
            REG_CAP_ADDR: begin
              cap_rd_req  <= 1'b1;
              cap_rd_addr <= reg_wdata;
            end
            default: begin
              if (reg_addr >= REG_GAIN0 && reg_addr < REG_GAIN0 + 12'(N_CH))
                gain[2'(reg_addr - REG_GAIN0)] <= reg_wdata[GAIN_W-1:0];
              if (reg_addr >= REG_ATT0 && reg_addr < REG_ATT0 + 12'(N_CH))
                att_manual[2'(reg_addr - REG_ATT0)] <= reg_wdata[ATT_W-1:0];
              if (reg_addr >= REG_TK0 && reg_addr < REG_TK0 + 12'(N_CH))
                tk[2'(reg_addr - REG_TK0)] <= reg_wdata[23:0];
            end
          endcase
        end
      end

      reg_rvalid <= reg_rd;
      if (reg_rd) begin
        unique case (reg_addr)
          REG_ID:        reg_rdata <= BPM_ID;
          REG_CTRL:      reg_rdata <= {26'd0, tc_enable, xb_enable, agc_enable, rec_enable, 2'b00};
          REG_NCO:       reg_rdata <= 32'(ddc_cfg.nco_fcw);
          REG_CIC_R:     reg_rdata <= 32'(ddc_cfg.cic_r);
          REG_CIC_SHIFT: reg_rdata <= 32'(ddc_cfg.cic_shift);
          REG_FIR1_DEC:  reg_rdata <= 32'(ddc_cfg.fir1_dec);
          REG_FIR1_TAPS: reg_rdata <= 32'(ddc_cfg.fir1_taps);
          REG_FIR2_DEC:  reg_rdata <= 32'(ddc_cfg.fir2_dec);
          REG_FIR2_TAPS: reg_rdata <= 32'(ddc_cfg.fir2_taps);
          REG_KX:        reg_rdata <= 32'(pos_cfg.kx);
          REG_KY:        reg_rdata <= 32'(pos_cfg.ky);
          REG_KQ:        reg_rdata <= 32'(pos_cfg.kq);
          REG_XB_PERIOD: reg_rdata <= 32'(xb_period);
          REG_XB_BLANK:  reg_rdata <= 32'(xb_blank);
          REG_AGC_HI:    reg_rdata <= 32'(agc_hi);
          REG_AGC_LO:    reg_rdata <= 32'(agc_lo);
          REG_STATUS:    reg_rdata <= {28'd0, xbar_state, ovr_l, cap_busy, cap_done};
          REG_POS_X:     reg_rdata <= x_l;
          REG_POS_Y:     reg_rdata <= y_l;
          REG_CHARGE:    reg_rdata <= q_l;
          REG_REC_PTR:   reg_rdata <= rec_ptr;
          REG_REC_DROP:  reg_rdata <= rec_dropped;
          REG_CAP_ADDR:  reg_rdata <= cap_rd_addr;
          REG_CAP_LO:    reg_rdata <= cap_l[31:0];
          REG_CAP_HI:    reg_rdata <= cap_l[63:32];
          REG_TEMP_REF:  reg_rdata <= 32'(temp_ref);
          REG_TEMP:      reg_rdata <= 32'(temp);
          default: begin
            reg_rdata <= 32'hDEAD_BEEF;
            if (reg_addr >= REG_GAIN0 && reg_addr < REG_GAIN0 + 12'(N_CH))
              reg_rdata <= 32'(gain[2'(reg_addr - REG_GAIN0)]);
            if (reg_addr >= REG_ATT0 && reg_addr < REG_ATT0 + 12'(N_CH))
              reg_rdata <= 32'(att_manual[2'(reg_addr - REG_ATT0)]);
            if (reg_addr >= REG_TK0 && reg_addr < REG_TK0 + 12'(N_CH))
              reg_rdata <= 32'(tk[2'(reg_addr - REG_TK0)]);
            if (reg_addr >= REG_AMP0 && reg_addr < REG_AMP0 + 12'(N_CH))
              reg_rdata <= 32'(amp[2'(reg_addr - REG_AMP0)]);
            if (reg_addr >= REG_ATT_RB0 && reg_addr < REG_ATT_RB0 + 12'(N_CH))
              reg_rdata <= 32'(att[2'(reg_addr - REG_ATT_RB0)]);
          end
        endcase
      end
    end
  end
endmodule
