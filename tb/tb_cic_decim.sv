// tb_cic_decim: random input against a reference made by convolving the input
// with the CIC impulse response (five cascaded boxcars of length r), delayed
// by the ORDER integrator registers and decimated; covers r = 4, 7 and 32 with
// a run-time change, and checks the output rate.
module tb_cic_decim;
  import bpm_pkg::*;
  logic clk = 0, rst = 1, vi = 0, vo;
  logic signed [MIX_W-1:0] x;
  logic [5:0] r, sh;
  data_t y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cic_decim dut (.clk, .rst, .valid_i(vi), .x, .r, .shift(sh), .valid_o(vo), .y);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint xs[$];     // all inputs since the last (re)start
  longint h[$];
  int     nin, nout;

  task automatic make_h(input int rr);
    longint a[$], b[$];
    a = '{1};
    for (int st = 0; st < CIC_ORDER; st++) begin
      b = {};
      for (int n = 0; n < a.size() + rr - 1; n++) begin
        longint acc = 0;
        for (int k = 0; k < rr; k++) if (n - k >= 0 && n - k < a.size()) acc += a[n-k];
        b.push_back(acc);
      end
      a = b;
    end
    h = a;
  endtask

  function automatic longint yref(input int n, input int shv);
    longint acc = 0;
    for (int k = 0; k < h.size(); k++) if (n - k >= 0) acc += h[k] * xs[n-k];
    acc = acc >>> shv;
    if (acc > 8388607) acc = 8388607;
    if (acc < -8388608) acc = -8388608;
    return acc;
  endfunction

  task automatic run(input int rr, input int shv, input int nouts, input int gap);
    int outs = 0, last_dump = 0;
    // restart from zero state
    rst = 1; vi = 0;
    @(negedge clk); @(negedge clk);
    rst = 0; r = 6'(rr); sh = 6'(shv);
    xs = {};
    make_h(rr);
    nin = 0;
    while (outs < nouts) begin
      @(negedge clk);
      if (vo) begin
        checks++;
        // the output belongs to the input taken with index nin-1 (rr-th of the group)
        if (longint'(y) != yref(last_dump - CIC_ORDER, shv)) begin
          failures++;
          $display("FAIL r=%0d out %0d: y=%0d exp=%0d", rr, outs, y, yref(last_dump - CIC_ORDER, shv));
        end
        outs++;
      end
      vi = ($urandom_range(0, gap) == 0);
      x  = MIX_W'($urandom_range(0, 2 * 131071) - 131071);
      if (vi) begin
        xs.push_back(longint'(x));
        nin++;
        if (nin % rr == 0) last_dump = nin - 1;
      end
    end
    checks++;
    if (nin / rr != nouts && nin / rr != nouts + 1) begin
      failures++;
      $display("FAIL rate: %0d inputs for %0d outputs at r=%0d", nin, nouts, rr);
    end
  endtask

  initial begin
    x = '0; r = 6'd4; sh = '0;
    repeat (3) @(posedge clk);
    run(4, 4, 300, 0);
    run(7, 8, 200, 2);
    run(32, 19, 60, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
