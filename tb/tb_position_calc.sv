// tb_position_calc: random button amplitudes and geometry factors against the
// difference-over-sum positions computed in floating point by the testbench,
// the fixed-point charge computed exactly, and the 28-clock latency.
module tb_position_calc;
  import bpm_pkg::*;
  logic clk = 0, rst = 1, vi = 0, vo;
  amp_t a [N_CH];
  pos_cfg_t cfg;
  logic [31:0] xf, yf, q;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  position_calc dut (.clk, .rst, .valid_i(vi), .amp(a), .cfg, .valid_o(vo), .x_f(xf), .y_f(yf), .charge(q));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real    ex_q[$], ey_q[$];
  longint eq_q[$];
  int     t_q[$];

  always @(posedge clk) if (!rst && vi) begin
    real s, dx, dy;
    s  = real'(a[0]) + real'(a[1]) + real'(a[2]) + real'(a[3]);
    dx = real'(a[0]) + real'(a[3]) - real'(a[1]) - real'(a[2]);
    dy = real'(a[0]) + real'(a[1]) - real'(a[2]) - real'(a[3]);
    ex_q.push_back(s == 0.0 ? 0.0 : real'(cfg.kx) / 65536.0 * dx / s);
    ey_q.push_back(s == 0.0 ? 0.0 : real'(cfg.ky) / 65536.0 * dy / s);
    eq_q.push_back((longint'(a[0]) + a[1] + a[2] + a[3]) * longint'(cfg.kq) >> 16);
    t_q.push_back(cyc);
  end

  // IEEE-754 single precision to real, decoded here independently of the design
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

  function automatic bit close(input real got, input real e);
    real d = got - e;
    if (d < 0.0) d = -d;
    return d <= 1e-6 + 2e-6 * ((e < 0.0) ? -e : e);
  endfunction

  always @(posedge clk) if (!rst && vo) begin
    real ex, ey, gx, gy;
    longint eq;
    int t0;
    ex = ex_q.pop_front(); ey = ey_q.pop_front(); eq = eq_q.pop_front(); t0 = t_q.pop_front();
    gx = f2r(xf);
    gy = f2r(yf);
    checks += 4;
    if (!close(gx, ex)) begin failures++; $display("FAIL x=%g exp=%g", gx, ex); end
    if (!close(gy, ey)) begin failures++; $display("FAIL y=%g exp=%g", gy, ey); end
    if (longint'(q) != ((eq > 64'hFFFF_FFFF) ? 64'hFFFF_FFFF : eq)) begin
      failures++; $display("FAIL q=%0d exp=%0d", q, eq);
    end
    if (cyc - t0 != 28) begin failures++; $display("FAIL latency %0d", cyc - t0); end
  end

  initial begin
    cfg = '{kx: 24'd655360, ky: 24'd655360, kq: 24'd65536};
    for (int c = 0; c < N_CH; c++) a[c] = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      vi = ($urandom_range(0, 3) != 0);
      if (n == 1000) begin
        // the factors are applied late in the pipeline: let it drain first
        vi = 0;
        repeat (40) @(negedge clk);
        cfg = '{kx: 24'd1000000, ky: 24'd300000, kq: 24'd12345678};
        vi = 1;
      end
      for (int c = 0; c < N_CH; c++) begin
        if (n % 5 == 0) a[c] = AMP_W'($urandom);                        // anywhere
        else a[c] = AMP_W'(1000000 + $urandom_range(0, 20000));          // near centre
      end
      if (n == 7) for (int c = 0; c < N_CH; c++) a[c] = '0;
      if (n == 8) begin a[0] = 24'd5000; a[1] = 0; a[2] = 0; a[3] = 0; end
    end
    @(negedge clk) vi = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (t_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
