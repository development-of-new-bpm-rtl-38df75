// tb_bpm_regs: reset values, write/read-back of every setting (including the
// temperature reference and coefficients), coefficient writes to FIR1 and
// FIR2, single-clock control pulses, status and read-back registers (the
// front-end temperature among them), each read returning one clock after the
// request.
module tb_bpm_regs;
  import bpm_pkg::*;
  logic clk = 0, rst = 1, wr = 0, rd = 0, rv;
  logic [11:0] addr;
  logic [31:0] wdata, rdata;
  ddc_cfg_t cfg;
  coef_wr_t coef;
  logic [GAIN_W-1:0] gain [N_CH];
  logic [ATT_W-1:0] attm [N_CH], att [N_CH];
  pos_cfg_t pcfg;
  logic arm, trig, rec_en, agc_en, xb_en, tc_en, crq, pv = 0;
  logic signed [15:0] tref;
  logic signed [23:0] tk [N_CH];
  logic [15:0] xbp, ahi, alo;
  logic [7:0] xbb;
  logic [31:0] cra;
  amp_t amp [N_CH];
  int checks = 0, failures = 0, narm = 0, ntrig = 0, ncrq = 0;
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (arm) narm++;
    if (trig) ntrig++;
    if (crq) ncrq++;
  end

  bpm_regs dut (
    .clk, .rst, .reg_wr(wr), .reg_rd(rd), .reg_addr(addr), .reg_wdata(wdata), .reg_rvalid(rv), .reg_rdata(rdata),
    .ddc_cfg(cfg), .coef, .gain, .att_manual(attm), .pos_cfg(pcfg), .cap_arm(arm), .cap_trig(trig),
    .rec_enable(rec_en), .agc_enable(agc_en), .xb_enable(xb_en), .tc_enable(tc_en), .temp_ref(tref), .tk, .xb_period(xbp), .xb_blank(xbb),
    .agc_hi(ahi), .agc_lo(alo), .cap_rd_req(crq), .cap_rd_addr(cra),
    .cap_done(1'b1), .cap_busy(1'b0), .cap_rd_valid(1'b1), .cap_rd_data(64'h1122334455667788),
    .fir_overrun(1'b0), .xbar_state(1'b1), .pos_valid(pv), .pos_x(32'h3F800000), .pos_y(32'hBF800000),
    .charge(32'd777), .amp, .att, .rec_ptr(32'd99), .rec_dropped(32'd3), .temp(-16'sd300)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wreg(input logic [11:0] a, input logic [31:0] v);
    @(negedge clk);
    wr = 1; addr = a; wdata = v;
    @(negedge clk);
    wr = 0;
  endtask

  task automatic expect_reg(input logic [11:0] a, input logic [31:0] v);
    @(negedge clk);
    rd = 1; addr = a;
    @(negedge clk);
    rd = 0;
    checks++;
    if (!rv || rdata != v) begin
      failures++;
      $display("FAIL reg %h = %h exp %h (rvalid %0d)", a, rdata, v, rv);
    end
  endtask

  initial begin
    for (int c = 0; c < N_CH; c++) begin amp[c] = AMP_W'(100 + c); att[c] = ATT_W'(c + 1); end
    addr = '0; wdata = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    expect_reg(REG_ID, BPM_ID);
    expect_reg(REG_NCO, 32'd16777216);
    expect_reg(REG_CIC_R, 32'd16);
    expect_reg(REG_FIR1_DEC, 32'd16);
    expect_reg(REG_FIR2_DEC, 32'd8);
    expect_reg(REG_KX, 32'd655360);
    expect_reg(REG_GAIN0 + 12'd2, 32'd65536);
    expect_reg(REG_TEMP_REF, 32'd6400);
    expect_reg(REG_TEMP, -32'sd300);
    // write and read back the settings
    wreg(REG_NCO, 32'd1234567);       expect_reg(REG_NCO, 32'd1234567);
    wreg(REG_CIC_R, 32'd32);          expect_reg(REG_CIC_R, 32'd32);
    wreg(REG_CIC_SHIFT, 32'd19);      expect_reg(REG_CIC_SHIFT, 32'd19);
    wreg(REG_FIR1_TAPS, 32'd1024);    expect_reg(REG_FIR1_TAPS, 32'd1024);
    wreg(REG_FIR2_TAPS, 32'd77);      expect_reg(REG_FIR2_TAPS, 32'd77);
    wreg(REG_KY, 32'd500000);         expect_reg(REG_KY, 32'd500000);
    wreg(REG_XB_PERIOD, 32'd300);     expect_reg(REG_XB_PERIOD, 32'd300);
    wreg(REG_AGC_LO, 32'd1000);       expect_reg(REG_AGC_LO, 32'd1000);
    wreg(REG_GAIN0 + 12'd3, 32'd70000); expect_reg(REG_GAIN0 + 12'd3, 32'd70000);
    wreg(REG_ATT0 + 12'd1, 32'd33);   expect_reg(REG_ATT0 + 12'd1, 32'd33);
    wreg(REG_TEMP_REF, 32'hFFFF_F000); expect_reg(REG_TEMP_REF, 32'hFFFF_F000);
    wreg(REG_TK0 + 12'd2, 32'hFF80_0001); expect_reg(REG_TK0 + 12'd2, 32'hFF80_0001);
    checks++;
    if (tref != -16'sd4096 || tk[2] != -24'sh7FFFFF || tk[1] != 24'sd0) begin failures++; $display("FAIL temperature settings"); end
    checks += 6;
    if (cfg.nco_fcw != 27'd1234567 || cfg.cic_r != 6'd32 || cfg.fir1_taps != 11'd1024) failures++;
    if (gain[3] != 18'd70000 || attm[1] != 6'd33 || pcfg.ky != 24'd500000) failures++;
    if (xbp != 16'd300 || alo != 16'd1000) failures++;
    // control bits and pulses
    wreg(REG_CTRL, 32'h3F);
    checks += 2;
    if (!(rec_en && agc_en && xb_en && tc_en)) begin failures++; $display("FAIL ctrl bits"); end
    repeat (3) @(negedge clk);
    if (narm != 1 || ntrig != 1) begin failures++; $display("FAIL pulses arm=%0d trig=%0d", narm, ntrig); end
    expect_reg(REG_CTRL, 32'h3C);
    // coefficient writes
    fork
      wreg(REG_FIR2_COEF + 12'd513, 32'h0003_FFFF);
      begin
        @(negedge clk); @(posedge clk); #1;
        checks++;
        if (!(coef.we && coef.sel && coef.addr == 10'd513 && coef.data == -18'sd1)) begin
          failures++; $display("FAIL coef write %p", coef);
        end
      end
    join
    @(negedge clk);
    checks++;
    if (coef.we) begin failures++; $display("FAIL coef we held"); end
    fork
      wreg(REG_FIR2_COEF + 12'd5, 32'd1234);
      begin
        @(negedge clk); @(posedge clk); #1;
        checks++;
        if (!(coef.we && coef.sel && coef.addr == 10'd5 && coef.data == 18'sd1234)) begin
          failures++; $display("FAIL coef write %p", coef);
        end
      end
    join
    fork
      wreg(REG_FIR1_COEF + 12'd1023, 32'h0002_0000);
      begin
        @(negedge clk); @(posedge clk); #1;
        checks++;
        if (!(coef.we && !coef.sel && coef.addr == 10'd1023 && coef.data == -18'sd131072)) begin
          failures++; $display("FAIL coef write %p", coef);
        end
      end
    join
    // raw memory read request
    wreg(REG_CAP_ADDR, 32'd4321);
    @(negedge clk);
    checks++;
    if (ncrq != 1 || cra != 32'd4321) begin failures++; $display("FAIL cap read request"); end
    expect_reg(REG_CAP_LO, 32'h55667788);
    expect_reg(REG_CAP_HI, 32'h11223344);
    // read-back of results
    @(negedge clk) pv = 1;
    @(negedge clk) pv = 0;
    expect_reg(REG_POS_X, 32'h3F800000);
    expect_reg(REG_POS_Y, 32'hBF800000);
    expect_reg(REG_CHARGE, 32'd777);
    expect_reg(REG_STATUS, 32'h9);
    expect_reg(REG_REC_PTR, 32'd99);
    expect_reg(REG_REC_DROP, 32'd3);
    expect_reg(REG_AMP0 + 12'd2, 32'd102);
    expect_reg(REG_ATT_RB0 + 12'd3, 32'd4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
