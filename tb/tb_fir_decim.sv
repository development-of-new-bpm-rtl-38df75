// tb_fir_decim: loads random coefficients and compares outputs with a
// reference convolution. Covers several orders and decimations, the maximum
// order allowed by the cycle budget, the order-1 bypass, the overrun flag when
// the order exceeds the budget, and the output latency of taps+3 clocks.
module tb_fir_decim;
  import bpm_pkg::*;
  localparam int MT = 64;
  logic clk = 0, rst = 1, vi = 0, vo, ovr;
  data_t x, y;
  logic [FIR_DEC_W-1:0] dec;
  logic [FIR_TAPS_W-1:0] taps;
  logic cwe;
  logic [5:0] caddr;
  coef_t cdata;
  int checks = 0, failures = 0, overruns = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (!rst && ovr) overruns++;

  fir_decim #(.MAX_TAPS(MT)) dut (
    .clk, .rst, .valid_i(vi), .x, .dec, .taps, .coef_we(cwe), .coef_addr(caddr), .coef_data(cdata),
    .valid_o(vo), .y, .overrun(ovr)
  );

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cf[MT];
  longint xs[$];
  longint exp_q[$];
  int     due_t[$];
  bit     known_q[$];   // window lies completely after the reset

  task automatic load(input int scale);
    for (int k = 0; k < MT; k++) begin
      @(negedge clk);
      cwe = 1; caddr = 6'(k);
      cf[k] = longint'($urandom_range(0, 2 * scale) - scale);
      cdata = COEF_W'(cf[k]);
    end
    @(negedge clk) cwe = 0;
  endtask

  // period: clocks between inputs; expect_ovr: budget deliberately exceeded
  task automatic run(input int d, input int t, input int period, input int nout, input bit expect_ovr);
    int outs = 0, ov0 = overruns;
    rst = 1; vi = 0;
    @(negedge clk); @(negedge clk);
    rst = 0; dec = FIR_DEC_W'(d); taps = FIR_TAPS_W'(t);
    xs = {}; exp_q = {}; due_t = {}; known_q = {};
    while (outs < nout) begin
      @(negedge clk);
      vi = ((cyc % period) == 0);
      x  = DATA_W'($urandom_range(0, 2 * 8000000) - 8000000);
      if (vi) begin
        xs.push_back(longint'(x));
        if (xs.size() % d == 0) begin
          longint acc = 0;
          if (t <= 1) acc = longint'(x);
          else begin
            for (int k = 0; k < t; k++) if (xs.size() - 1 - k >= 0) acc += cf[k] * xs[xs.size()-1-k];
            acc = acc >>> 16;
          end
          if (acc > 8388607) acc = 8388607;
          if (acc < -8388608) acc = -8388608;
          exp_q.push_back(acc);
          known_q.push_back(t <= 1 || xs.size() >= t);
          due_t.push_back(cyc);
        end
      end
      @(posedge clk); #1;
      if (vo) begin
        longint e = exp_q.pop_front();
        int t0 = due_t.pop_front();
        bit kn = known_q.pop_front();
        outs++;
        checks += 2;
        if (kn && longint'(y) != e) begin
          failures++;
          $display("FAIL dec=%0d taps=%0d out %0d: y=%0d exp=%0d", d, t, outs, y, e);
        end
        if (cyc - t0 != ((t <= 1) ? 1 : t + 3)) begin
          failures++;
          $display("FAIL latency %0d for taps=%0d", cyc - t0, t);
        end
      end
      if (expect_ovr && outs == 0 && overruns > ov0) break;
    end
    checks++;
    if (expect_ovr != (overruns > ov0)) begin
      failures++;
      $display("FAIL overrun flag: expected %0d, saw %0d", expect_ovr, overruns - ov0);
    end
  endtask

  initial begin
    x = '0; cwe = 0; caddr = '0; cdata = '0; dec = 5'd1; taps = 11'd1;
    load(30000);
    repeat (3) @(posedge clk);
    run(4, 10, 4, 100, 0);
    run(1, 2, 8, 100, 0);
    run(16, MT, 4, 40, 0);     // order = budget 4*16
    run(3, 1, 1, 100, 0);      // bypass with decimation
    load(131071);
    run(2, 7, 5, 100, 0);      // large coefficients: saturation
    run(4, 20, 4, 5, 1);       // 20 taps > budget 16
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
