// tb_bpm_fpga_top: end-to-end test of the BPM firmware at reduced memory and
// filter sizes. A model of the front end produces the four button signals of
// a beam at a known offset (an IF tone at f_s/8 per button, with per-channel
// analog gain errors, the RFFE crossbar and attenuators), and models of the
// QDR and DDR2 memories sit on the memory ports. All settings go through the
// register bus. Checked: calibrated X/Y/charge; the run-time change of the
// decimation (output spacing); FIR2 bypass; FIR1 overrun reporting; crossbar
// switching with re-swap and blanking; raw capture and read-back; position
// recording with memory stalls and FIFO overflow; temperature drift of the
// analog channels and its feed-forward correction; AGC steps in both
// directions. Each of these mechanisms is counted and must occur.
module tb_bpm_fpga_top;
  import bpm_pkg::*;
  localparam int CAW = 8, RAW = 6;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst = 1;
  logic adc_valid = 1;
  adc_t adc [N_CH];
  logic reg_wr = 0, reg_rd = 0, reg_rvalid;
  logic [11:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic [ATT_W-1:0] atten [N_CH];
  logic xbar_swap, qdr_we, qdr_re, qdr_rvalid, ddr_we, ddr_ready, pos_valid;
  logic [CAW-1:0] qdr_addr;
  logic [63:0] qdr_wdata, qdr_rdata;
  logic [RAW-1:0] ddr_addr;
  logic [127:0] ddr_wdata;
  logic [31:0] pos_x, pos_y, charge;
  logic signed [15:0] rffe_temp = 16'sd6400;   // 25 degrees, the calibration point

  bpm_fpga_top #(.FIR_MAX_TAPS(64), .CAP_AW(CAW), .REC_AW(RAW), .AGC_WIN_LOG2(6)) dut (
    .clk, .rst, .adc_valid, .adc, .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rvalid, .reg_rdata,
    .rffe_atten(atten), .xbar_swap, .rffe_temp, .qdr_we, .qdr_re, .qdr_addr, .qdr_wdata, .qdr_rvalid, .qdr_rdata,
    .ddr_we, .ddr_addr, .ddr_wdata, .ddr_ready, .pos_valid, .pos_x, .pos_y, .charge
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

  // ---------------- front-end model ----------------
  real btn_a [N_CH] = '{12000.0, 9000.0, 8000.0, 11000.0};   // A, B, C, D
  real ch_g  [N_CH] = '{1.0, 0.9, 1.1, 0.95};                // analog channel gain errors
  real ch_tc [N_CH] = '{0.003, 0.001, -0.002, 0.004};        // their temperature coefficients, 1/degree
  real level = 1.0;
  longint n = 0;
  always @(posedge clk) begin
    n <= n + 1;
    for (int c = 0; c < N_CH; c++) begin
      int b;
      real v;
      b = xbar_swap ? (c + 2) % N_CH : c;
      v = level * btn_a[b] * ch_g[c] / (1.0 + ch_tc[c] * real'(rffe_temp - 16'sd6400) / 256.0) * $pow(10.0, -0.025 * real'(atten[c])) * $cos(2.0 * PI * real'(n) / 8.0 + 0.3);
      if (v > 32767.0) v = 32767.0;
      if (v < -32768.0) v = -32768.0;
      adc[c] <= adc_t'($rtoi(v));
    end
  end

  // ADC history for the capture check
  logic [63:0] hist [$];
  always @(posedge clk) if (!rst) hist.push_back({adc[3], adc[2], adc[1], adc[0]});

  // ---------------- memory models ----------------
  logic [63:0] qmem [2**CAW];
  logic q1v; logic [63:0] q1d;
  always @(posedge clk) begin
    if (!rst && qdr_we) qmem[qdr_addr] <= qdr_wdata;
    q1v <= qdr_re; q1d <= qmem[qdr_addr];
    qdr_rvalid <= q1v; qdr_rdata <= q1d;
  end

  logic [127:0] dmem [2**RAW];
  bit ddr_stall = 0;
  int ddr_writes = 0, ddr_stalled = 0;
  always @(posedge clk) ddr_ready <= !ddr_stall && ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (!rst && ddr_we) begin
    if (!ddr_ready) ddr_stalled++;
    else begin
      dmem[ddr_addr] <= ddr_wdata;
      ddr_writes++;
    end
  end

  // ---------------- position checks ----------------
  real ex, ey, eq;
  bit  check_pos = 0;
  int  npos = 0, last_pos_cyc = 0, spacing = 0, pos_fail = 0;

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

  always @(posedge clk) if (pos_valid) begin
    spacing      <= cyc - last_pos_cyc;
    last_pos_cyc <= cyc;
    npos++;
    if (check_pos) begin
      real gx, gy;
      gx = f2r(pos_x);
      gy = f2r(pos_y);
      checks += 3;
      if (gx - ex > 0.005 || ex - gx > 0.005 || gy - ey > 0.005 || ey - gy > 0.005 ||
          real'(charge) > eq * 1.004 || real'(charge) < eq * 0.996) begin
        failures++;
        pos_fail++;
        if (pos_fail < 10) $display("FAIL pos x=%f (%f) y=%f (%f) q=%0d (%f) xbar=%0d", gx, ex, gy, ey, charge, eq, xbar_swap);
      end
    end
  end

  // ---------------- register bus ----------------
  task automatic wreg(input logic [11:0] a, input logic [31:0] v);
    @(negedge clk);
    reg_wr = 1; reg_addr = a; reg_wdata = v;
    @(negedge clk);
    reg_wr = 0;
  endtask

  task automatic rreg(input logic [11:0] a, output logic [31:0] v);
    @(negedge clk);
    reg_rd = 1; reg_addr = a;
    @(negedge clk);
    reg_rd = 0;
    v = reg_rdata;
  endtask

  task automatic wait_pos(input int k);
    int n0 = npos;
    while (npos < n0 + k) @(negedge clk);
  endtask

  // mechanism counters
  int m_pos = 0, m_mode = 0, m_bypass = 0, m_overrun = 0, m_xbar = 0, m_capture = 0,
      m_record = 0, m_stall = 0, m_overflow = 0, m_agc_up = 0, m_agc_down = 0, m_temp = 0;

  initial begin
    logic [31:0] v, v2;
    int sw0, base, ok, n0_fail;
    for (int c = 0; c < N_CH; c++) adc[c] = '0;
    repeat (4) @(negedge clk);
    rst = 0;

    // configuration: CIC 8, FIR1 8-tap average / 2, FIR2 bypass / 1: decimation 32
    for (int k = 0; k < 64; k++) wreg(REG_FIR1_COEF + 12'(k), (k < 8) ? 32'd8192 : 32'd0);
    wreg(REG_CIC_R, 8); wreg(REG_CIC_SHIFT, 15);
    wreg(REG_FIR1_DEC, 2); wreg(REG_FIR1_TAPS, 8);
    wreg(REG_FIR2_DEC, 1); wreg(REG_FIR2_TAPS, 1);
    for (int c = 0; c < N_CH; c++) wreg(REG_GAIN0 + 12'(c), $rtoi(65536.0 / ch_g[c] + 0.5));
    ex = 10.0 * (btn_a[0] + btn_a[3] - btn_a[1] - btn_a[2]) / (btn_a[0] + btn_a[1] + btn_a[2] + btn_a[3]);
    ey = 10.0 * (btn_a[0] + btn_a[1] - btn_a[2] - btn_a[3]) / (btn_a[0] + btn_a[1] + btn_a[2] + btn_a[3]);
    eq = btn_a[0] + btn_a[1] + btn_a[2] + btn_a[3];

    // 1. positions with FIR2 bypassed
    wait_pos(20);
    check_pos = 1;
    wait_pos(30);
    checks++;
    if (spacing != 32) begin failures++; $display("FAIL spacing %0d exp 32", spacing); end
    m_pos = npos; m_bypass++;
    rreg(REG_POS_X, v);
    checks++;
    if (f2r(v) - ex > 0.005 || ex - f2r(v) > 0.005) begin failures++; $display("FAIL REG_POS_X %f", f2r(v)); end

    // 2. mode switch: CIC 16, FIR1 / 4, FIR2 8-tap filter / 2: decimation 256
    check_pos = 0;
    for (int k = 0; k < 8; k++) wreg(REG_FIR2_COEF + 12'(k), 32'd8192);
    wreg(REG_CIC_R, 16); wreg(REG_CIC_SHIFT, 20); wreg(REG_FIR1_DEC, 4);
    wreg(REG_FIR2_TAPS, 8); wreg(REG_FIR2_DEC, 2);
    wait_pos(12);
    check_pos = 1;
    wait_pos(6);
    checks++;
    if (spacing != 256) begin failures++; $display("FAIL spacing %0d exp 256", spacing); end
    else m_mode++;

    // 3. FIR1 order beyond its budget (32 clocks per FIR1 input * 4 = 128 < 200)
    check_pos = 0;
    wreg(REG_STATUS, 0);
    wreg(REG_FIR1_DEC, 1); wreg(REG_FIR1_TAPS, 40);   // budget 32
    repeat (400) @(negedge clk);
    rreg(REG_STATUS, v);
    checks++;
    if (!v[2]) begin failures++; $display("FAIL overrun not reported"); end
    else m_overrun++;
    wreg(REG_FIR1_TAPS, 8); wreg(REG_FIR1_DEC, 2);
    wreg(REG_FIR2_TAPS, 1); wreg(REG_FIR2_DEC, 1);
    wreg(REG_CIC_R, 8); wreg(REG_CIC_SHIFT, 15);
    wreg(REG_STATUS, 0);
    wait_pos(20);
    rreg(REG_STATUS, v);
    checks++;
    if (v[2]) begin failures++; $display("FAIL overrun flag stuck"); end

    // 4. crossbar: toggle every 16 outputs, drop 8 after each switch; record positions
    wreg(REG_XB_PERIOD, 16); wreg(REG_XB_BLANK, 8);
    wreg(REG_CTRL, 32'h14);      // crossbar + recorder
    sw0 = 0;
    check_pos = 1;
    for (int k = 0; k < 200; k++) begin
      logic s0;
      s0 = xbar_swap;
      wait_pos(1);
      if (xbar_swap != s0) sw0++;
      if (k == 100) ddr_stall = 1;
      if (k == 150) ddr_stall = 0;
    end
    m_xbar = sw0;
    wreg(REG_CTRL, 32'h00);
    repeat (100) @(negedge clk);
    rreg(REG_REC_DROP, v);
    rreg(REG_REC_PTR, v2);
    m_overflow = int'(v);
    m_stall = ddr_stalled;
    m_record = ddr_writes;
    checks += 2;
    if (v2 != 32'(ddr_writes % (2**RAW))) begin failures++; $display("FAIL rec ptr %0d writes %0d", v2, ddr_writes); end
    ok = 1;
    for (int k = 0; k < 2**RAW; k++) begin
      real gx;
      gx = f2r(dmem[k][31:0]);
      if (gx - ex > 0.005 || ex - gx > 0.005) begin
        ok = 0;
        $display("record %0d: %h", k, dmem[k]);
      end
    end
    if (!ok) begin failures++; $display("FAIL recorded positions"); end

    // 4b. the board warms up by 4 degrees: the position drifts until the
    // feed-forward correction with the channels' coefficients is switched on
    for (int c = 0; c < N_CH; c++)
      wreg(REG_TK0 + 12'(c), 32'($rtoi(ch_tc[c] / 256.0 * 4294967296.0 + (ch_tc[c] < 0.0 ? -0.5 : 0.5))));
    check_pos = 0;
    rffe_temp = 16'sd6400 + 16'sd1024;
    wait_pos(12);
    rreg(REG_POS_X, v);
    rreg(REG_TEMP, v2);
    checks += 2;
    if (f2r(v) - ex < 0.01 && ex - f2r(v) < 0.01) begin failures++; $display("FAIL no drift without correction: %f", f2r(v)); end
    if (v2 != 32'(rffe_temp)) begin failures++; $display("FAIL REG_TEMP %0d", v2); end
    wreg(REG_CTRL, 32'h20);
    wait_pos(12);
    n0_fail = pos_fail;
    check_pos = 1;
    wait_pos(20);
    check_pos = 0;
    if (pos_fail == n0_fail) m_temp++;
    rffe_temp = 16'sd6400;
    wreg(REG_CTRL, 32'h00);
    wait_pos(12);

    // 5. raw data capture and read-back
    wreg(REG_CTRL, 32'h01);      // arm
    wreg(REG_CTRL, 32'h02);      // trigger
    repeat (2**CAW + 20) @(negedge clk);
    rreg(REG_STATUS, v);
    checks++;
    if (!v[0]) begin failures++; $display("FAIL capture not done"); end
    base = -1;
    for (int k = hist.size() - 1; k >= 0; k--) if (hist[k] == qmem[0]) begin
      ok = 1;
      for (int j = 1; j < 2**CAW && k + j < hist.size(); j++) if (hist[k+j] != qmem[j]) ok = 0;
      if (ok) begin base = k; break; end
    end
    checks++;
    if (base < 0) begin failures++; $display("FAIL captured data is not a contiguous ADC record"); end
    else m_capture++;
    for (int k = 0; k < 3; k++) begin
      int a;
      a = $urandom_range(0, 2**CAW - 1);
      wreg(REG_CAP_ADDR, 32'(a));
      repeat (6) @(negedge clk);
      rreg(REG_CAP_LO, v);
      rreg(REG_CAP_HI, v2);
      checks++;
      if ({v2, v} != qmem[a]) begin failures++; $display("FAIL capture read-back %0d", a); end
    end

    // 6. AGC: a loud beam raises the attenuation, a weak one lowers it again
    check_pos = 0;
    wreg(REG_CTRL, 32'h08);
    level = 4.0;
    repeat (64 * 30) @(negedge clk);
    m_agc_up = int'(atten[0]);
    checks++;
    if (atten[0] == 0) begin failures++; $display("FAIL AGC did not attenuate"); end
    level = 0.5;
    repeat (64 * 60) @(negedge clk);
    m_agc_down = m_agc_up - int'(atten[0]);
    checks++;
    if (atten[0] != 0) begin failures++; $display("FAIL AGC did not release: %0d", atten[0]); end

    // mechanism report
    $display("mechanisms: positions=%0d mode_switch=%0d fir_bypass=%0d fir_overrun=%0d xbar_switches=%0d capture=%0d",
             m_pos, m_mode, m_bypass, m_overrun, m_xbar, m_capture);
    $display("            ddr_records=%0d ddr_stalls=%0d fifo_drops=%0d agc_up=%0d agc_down=%0d temp_correction=%0d",
             m_record, m_stall, m_overflow, m_agc_up, m_agc_down, m_temp);
    checks += 12;
    if (m_temp == 0) failures++;
    if (m_pos == 0) failures++;
    if (m_mode == 0) failures++;
    if (m_bypass == 0) failures++;
    if (m_overrun == 0) failures++;
    if (m_xbar == 0) failures++;
    if (m_capture == 0) failures++;
    if (m_record == 0) failures++;
    if (m_stall == 0) failures++;
    if (m_overflow == 0) failures++;
    if (m_agc_up == 0) failures++;
    if (m_agc_down == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
