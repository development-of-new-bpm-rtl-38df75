// tb_xbar_reswap: amplitude samples whose channel order is crossed whenever
// the modelled RFFE crossbar is crossed must come out in button order;
// checks the toggle period, the blanking after each switch (including the
// return to straight when disabled) and the straight mode when disabled.
module tb_xbar_reswap;
  import bpm_pkg::*;
  logic clk = 0, rst = 1, en = 0, vi = 0, vo, sw, swd;
  amp_t ai [N_CH], ao [N_CH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  xbar_reswap dut (.clk, .rst, .enable(en), .period(16'd10), .blank(8'd3), .valid_i(vi), .amp_i(ai),
                   .valid_o(vo), .amp_o(ao), .xbar_swap(sw), .switched(swd));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   since = 0, nsw = 0, nout = 0, nin = 0;
  logic exp_state = 0;
  amp_t btn [N_CH];
  // samples after a switch still carry the old crossing (filter latency): the
  // first 3 are dropped by the design; the model applies the new state from then on
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en = (n >= 50 && n < 350);
      vi = ($urandom_range(0, 1) == 1);
      for (int c = 0; c < N_CH; c++) btn[c] = AMP_W'(1000 * (c + 1) + n);
      for (int c = 0; c < N_CH; c++) ai[c] = sw ? btn[(c + 2) % N_CH] : btn[c];
      if (vi) nin++;
      @(posedge clk); #1;
      if (swd) begin
        nsw++;
        checks++;
        // the sample of this clock is the 10th since the last switch
        if (en && since + 1 != 10) begin
          failures++;
          $display("FAIL period %0d", since + 1);
        end
        since = 0;
      end else if (vi && en) since++;
      if (vo) begin
        nout++;
        checks++;
        for (int c = 0; c < N_CH; c++) if (ao[c] != btn[c]) begin
          failures++;
          $display("FAIL n=%0d c=%0d out=%0d exp=%0d", n, c, ao[c], btn[c]);
        end
      end
    end
    checks += 2;
    if (nsw < 10) begin failures++; $display("FAIL only %0d switches", nsw); end
    if (nout != nin - 3 * nsw) begin failures++; $display("FAIL %0d outputs for %0d inputs, %0d switches", nout, nin, nsw); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
