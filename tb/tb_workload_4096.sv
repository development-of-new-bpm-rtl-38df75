// tb_workload_4096: the firmware in its power-up configuration, all
// parameters at their defaults: 160 MS/s, NCO at f_s/8 (a 20 MHz IF), CIC 16,
// compensation 2, FIR1 and FIR2 bypassed with decimation 16 and 8, giving a
// total decimation of 4096 and a 39.0625 kHz position rate with a 10 mm
// geometry factor. The buttons see a beam 0.5 mm right and 0.3 mm up of
// centre; the analog channels have gain errors, calibrated out with the
// channel gain registers. Checked: the settings read back, one position every
// 4096 clocks (25.6 us), and every X/Y within 100 nm of the exact value for
// the samples actually delivered: the tone is periodic in 8 samples, so the
// exact amplitude is the magnitude of one DFT bin of the ADC codes after the
// gain scaling (floor of x * gain / 2^16).
module tb_workload_4096;
  import bpm_pkg::*;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst = 1;
  adc_t adc [N_CH];
  logic reg_wr = 0, reg_rd = 0, reg_rvalid;
  logic [11:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic [ATT_W-1:0] atten [N_CH];
  logic xbar_swap, qdr_we, qdr_re, qdr_rvalid = 0, ddr_we, pos_valid;
  logic [18:0] qdr_addr;
  logic [63:0] qdr_wdata, qdr_rdata = '0;
  logic [23:0] ddr_addr;
  logic [127:0] ddr_wdata;
  logic [31:0] pos_x, pos_y, charge;

  bpm_fpga_top dut (
    .clk, .rst, .adc_valid(1'b1), .adc, .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rvalid, .reg_rdata,
    .rffe_atten(atten), .xbar_swap, .rffe_temp(16'sd6400), .qdr_we, .qdr_re, .qdr_addr, .qdr_wdata,
    .qdr_rvalid, .qdr_rdata, .ddr_we, .ddr_addr, .ddr_wdata, .ddr_ready(1'b1), .pos_valid, .pos_x, .pos_y,
    .charge
  );

  always #3.125 clk = ~clk;   // 160 MHz

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #4000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Beam model. With kx = ky = 10 mm, X = 10 (A + D - B - C) / S and
  // Y = 10 (A + B - C - D) / S; A..D below put the beam at (0.5, 0.3) mm.
  real btn_a [N_CH] = '{10800.0, 9800.0, 9200.0, 10200.0};
  real ch_g  [N_CH] = '{1.0, 0.93, 1.06, 0.97};
  int  gq    [N_CH];
  longint n = 0;
  always @(posedge clk) begin
    n <= n + 1;
    for (int c = 0; c < N_CH; c++)
      adc[c] <= adc_t'($rtoi(btn_a[c] * ch_g[c] * $cos(2.0 * PI * real'(n) / 8.0 + 0.4) + 0.5));
  end

  function automatic real f2r(input logic [31:0] f);
    real m;
    int  e;
    if (f[30:0] == 0) return 0.0;
    e = int'(f[30:23]) - 127;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    for (int k = 0; k < e; k++) m = m * 2.0;
    for (int k = 0; k > e; k--) m = m / 2.0;
    return f[31] ? -m : m;
  endfunction

  real ex, ey, worst = 0.0;
  bit  check_pos = 0;
  int  npos = 0, last_pos_cyc = 0;
  always @(posedge clk) if (pos_valid) begin
    if (check_pos) begin
      real dx, dy;
      dx = f2r(pos_x) - ex;
      dy = f2r(pos_y) - ey;
      if (dx < 0.0) dx = -dx;
      if (dy < 0.0) dy = -dy;
      if (dx > worst) worst = dx;
      if (dy > worst) worst = dy;
      checks += 2;
      if (dx > 1.0e-4 || dy > 1.0e-4) begin
        failures++;
        $display("FAIL x=%f (%f) y=%f (%f)", f2r(pos_x), ex, f2r(pos_y), ey);
      end
      if (cyc - last_pos_cyc != 4096) begin
        failures++;
        $display("FAIL spacing %0d", cyc - last_pos_cyc);
      end
    end
    last_pos_cyc <= cyc;
    npos++;
  end

  task automatic wreg(input logic [11:0] a, input logic [31:0] v);
    @(negedge clk);
    reg_wr = 1; reg_addr = a; reg_wdata = v;
    @(negedge clk);
    reg_wr = 0;
  endtask

  task automatic expect_reg(input logic [11:0] a, input logic [31:0] v);
    @(negedge clk);
    reg_rd = 1; reg_addr = a;
    @(negedge clk);
    reg_rd = 0;
    checks++;
    if (reg_rdata != v) begin failures++; $display("FAIL reg %h = %0d exp %0d", a, reg_rdata, v); end
  endtask

  initial begin
    real a [N_CH], s, re, im;
    int  q, y;
    repeat (4) @(negedge clk);
    rst = 0;
    expect_reg(REG_NCO, 32'd16777216);
    expect_reg(REG_CIC_R, 32'd16);
    expect_reg(REG_FIR1_DEC, 32'd16);
    expect_reg(REG_FIR1_TAPS, 32'd1);
    expect_reg(REG_FIR2_DEC, 32'd8);
    expect_reg(REG_FIR2_TAPS, 32'd1);
    expect_reg(REG_KX, 32'd655360);
    for (int c = 0; c < N_CH; c++) begin
      gq[c] = $rtoi(65536.0 / ch_g[c] + 0.5);
      wreg(REG_GAIN0 + 12'(c), 32'(gq[c]));
      re = 0.0; im = 0.0;
      for (int k = 0; k < 8; k++) begin
        q  = $rtoi(btn_a[c] * ch_g[c] * $cos(2.0 * PI * real'(k) / 8.0 + 0.4) + 0.5);
        y  = (q * gq[c]) >>> 16;
        re += real'(y) * $cos(2.0 * PI * real'(k) / 8.0);
        im += real'(y) * $sin(2.0 * PI * real'(k) / 8.0);
      end
      a[c] = $sqrt(re * re + im * im);
    end
    s  = a[0] + a[1] + a[2] + a[3];
    ex = 10.0 * (a[0] + a[3] - a[1] - a[2]) / s;
    ey = 10.0 * (a[0] + a[1] - a[2] - a[3]) / s;
    // let the chain fill, then check 40 positions
    while (npos < 6) @(negedge clk);
    check_pos = 1;
    while (npos < 46) @(negedge clk);
    check_pos = 0;
    $display("positions checked: 40, worst error %0.1f nm, rate %0.4f kHz",
             worst * 1.0e6, 160000.0 / 4096.0);
    checks++;
    if (npos < 46) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
