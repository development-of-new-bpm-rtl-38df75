// tb_bpm_fpga_top_full: the BPM firmware with every parameter at its default
// (1024-tap FIR memories, 512k-word raw-data memory, 2^24-record position
// memory, 2^16-sample AGC window). One complete operation: FIR1 is loaded
// with a 1024-tap boxcar through the register bus and used at its maximum
// order (CIC 32, compensation 2, FIR1 16: 1024 clocks per output, exactly the
// one-multiplier budget), positions and charge are checked against the beam
// model, the position stream is recorded to the DDR2 model, and a full
// 512k-sample raw capture is taken and compared with the ADC stream.
module tb_bpm_fpga_top_full;
  import bpm_pkg::*;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst = 1;
  adc_t adc [N_CH];
  logic reg_wr = 0, reg_rd = 0, reg_rvalid;
  logic [11:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic [ATT_W-1:0] atten [N_CH];
  logic xbar_swap, qdr_we, qdr_re, qdr_rvalid = 0, ddr_we, ddr_ready = 1, pos_valid;
  logic [18:0] qdr_addr;
  logic [63:0] qdr_wdata, qdr_rdata = '0;
  logic [23:0] ddr_addr;
  logic [127:0] ddr_wdata;
  logic [31:0] pos_x, pos_y, charge;

  bpm_fpga_top dut (
    .clk, .rst, .adc_valid(1'b1), .adc, .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rvalid, .reg_rdata,
    .rffe_atten(atten), .xbar_swap, .rffe_temp(16'sd6400), .qdr_we, .qdr_re, .qdr_addr, .qdr_wdata, .qdr_rvalid, .qdr_rdata,
    .ddr_we, .ddr_addr, .ddr_wdata, .ddr_ready, .pos_valid, .pos_x, .pos_y, .charge
  );

  always #3.125 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #8000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // beam model: buttons A..D, IF tone at f_s/8
  real btn_a [N_CH] = '{10500.0, 9500.0, 9800.0, 10200.0};
  longint n = 0;
  always @(posedge clk) begin
    n <= n + 1;
    for (int c = 0; c < N_CH; c++)
      adc[c] <= adc_t'($rtoi(btn_a[c] * $cos(2.0 * PI * real'(n) / 8.0 - 0.2 + 0.1 * real'(c))));
  end

  // QDR model: 512k x 64; ADC words seen during the capture, in order
  logic [63:0] qmem [2**19];
  logic [63:0] seen [$];
  int qwrites = 0;
  always @(posedge clk) begin
    if (!rst && qdr_we) begin
      qmem[qdr_addr] <= qdr_wdata;
      if (qdr_addr != 19'(qwrites)) begin failures++; $display("FAIL qdr addr %0d", qdr_addr); end
      qwrites++;
    end
    qdr_rvalid <= qdr_re;
    qdr_rdata  <= qmem[qdr_addr];
  end
  // the word on the ADC bus one clock before each write is the one that must be stored
  logic [63:0] adc_d;
  always @(posedge clk) adc_d <= {adc[3], adc[2], adc[1], adc[0]};

  // DDR2 model
  logic [127:0] dmem [int];
  always @(posedge clk) if (!rst && ddr_we && ddr_ready) dmem[int'(ddr_addr)] = ddr_wdata;

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

  real ex, ey, eq;
  bit  check_pos = 0;
  int  npos = 0, last_pos_cyc = 0, spacing = 0;
  always @(posedge clk) if (pos_valid) begin
    spacing      <= cyc - last_pos_cyc;
    last_pos_cyc <= cyc;
    npos++;
    if (check_pos) begin
      real gx, gy;
      gx = f2r(pos_x);
      gy = f2r(pos_y);
      checks++;
      if (gx - ex > 0.002 || ex - gx > 0.002 || gy - ey > 0.002 || ey - gy > 0.002 ||
          real'(charge) > eq * 1.003 || real'(charge) < eq * 0.997) begin
        failures++;
        $display("FAIL pos x=%f (%f) y=%f (%f) q=%0d (%f)", gx, ex, gy, ey, charge, eq);
      end
    end
  end

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

  initial begin
    logic [31:0] v, v2;
    int n0, t0, bad;
    for (int c = 0; c < N_CH; c++) adc[c] = '0;
    repeat (4) @(negedge clk);
    rst = 0;
    rreg(REG_ID, v);
    checks++;
    if (v != BPM_ID) failures++;

    // maximum-order FIR1: 1024-tap boxcar, coefficient 64 (sum 65536)
    for (int k = 0; k < 1024; k++) wreg(REG_FIR1_COEF + 12'(k), 32'd64);
    wreg(REG_CIC_R, 32); wreg(REG_CIC_SHIFT, 25);
    wreg(REG_FIR1_DEC, 16); wreg(REG_FIR1_TAPS, 1024);
    wreg(REG_FIR2_DEC, 1); wreg(REG_FIR2_TAPS, 1);
    wreg(REG_STATUS, 0);
    wreg(REG_CTRL, 32'h04);           // record positions
    ex = 10.0 * (btn_a[0] + btn_a[3] - btn_a[1] - btn_a[2]) / (btn_a[0] + btn_a[1] + btn_a[2] + btn_a[3]);
    ey = 10.0 * (btn_a[0] + btn_a[1] - btn_a[2] - btn_a[3]) / (btn_a[0] + btn_a[1] + btn_a[2] + btn_a[3]);
    eq = btn_a[0] + btn_a[1] + btn_a[2] + btn_a[3];

    // wait until the 1024-tap window holds only data taken with these settings
    n0 = npos;
    while (npos < n0 + 70) @(negedge clk);
    check_pos = 1;
    n0 = npos;
    while (npos < n0 + 20) @(negedge clk);
    checks += 2;
    if (spacing != 1024) begin failures++; $display("FAIL output spacing %0d", spacing); end
    rreg(REG_STATUS, v);
    if (v[2]) begin failures++; $display("FAIL overrun at the maximum order"); end

    // full raw capture, 512k words
    wreg(REG_CTRL, 32'h05);           // arm
    wreg(REG_CTRL, 32'h06);           // trigger
    t0 = cyc;
    do begin
      @(posedge clk);
      if (!rst && qdr_we) seen.push_back(adc_d);
    end while (qwrites < 2**19 && cyc - t0 < 2**19 + 1000);
    repeat (10) @(negedge clk);
    rreg(REG_STATUS, v);
    checks += 2;
    if (!v[0] || qwrites != 2**19) begin failures++; $display("FAIL capture: done=%0d words=%0d", v[0], qwrites); end
    bad = 0;
    for (int k = 0; k < 2**19; k++) if (qmem[k] != seen[k]) bad++;
    if (bad != 0) begin failures++; $display("FAIL %0d captured words differ", bad); end
    // and the captured samples must be consecutive ADC samples of the model
    checks++;
    bad = 0;
    for (int k = 1; k < 2**19; k += 4099) begin
      if (adc_t'(qmem[k][15:0]) - adc_t'(qmem[k-1][15:0]) == 0 &&
          adc_t'(qmem[k][31:16]) - adc_t'(qmem[k-1][31:16]) == 0) bad++;
    end
    if (bad > 2) begin failures++; $display("FAIL captured samples look frozen"); end
    for (int k = 0; k < 4; k++) begin
      int a;
      a = (k * 131071 + 17) % (2**19);
      wreg(REG_CAP_ADDR, 32'(a));
      repeat (4) @(negedge clk);
      rreg(REG_CAP_LO, v);
      rreg(REG_CAP_HI, v2);
      checks++;
      if ({v2, v} != qmem[a]) begin failures++; $display("FAIL read-back %0d", a); end
    end

    // recorded history
    wreg(REG_CTRL, 32'h00);
    repeat (20) @(negedge clk);
    rreg(REG_REC_PTR, v);
    checks += 2;
    if (int'(v) != dmem.num() || v < 100) begin failures++; $display("FAIL %0d records, pointer %0d", dmem.num(), v); end
    bad = 0;
    for (int k = int'(v) - 20; k < int'(v); k++) begin
      real gx;
      gx = f2r(dmem[k][31:0]);
      if (gx - ex > 0.002 || ex - gx > 0.002 || dmem[k][127:96] != 32'(k)) bad++;
    end
    if (bad != 0) begin failures++; $display("FAIL %0d bad records", bad); end
    $display("positions=%0d records=%0d raw words=%0d", npos, dmem.num(), qwrites);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
