// tb_agc: with a window of 64 valid samples (valid at random 3 of 4 clocks),
// a loud tone must raise the attenuation one step per window up to the point
// where the peak falls between the thresholds (modelled here by scaling the
// tone by 10^(-att*0.5/20)), a quiet tone must lower it step by step, the code
// must stop at 0 and at 63 (a tone that clips the ADC even at full
// attenuation), and follow the manual value when disabled. A reference model
// of the window peak predicts the code and the step pulses after every window.
module tb_agc;
  import bpm_pkg::*;
  localparam int WL = 6;
  logic clk = 0, rst = 1, en = 0, vi = 0, up, dn;
  logic [ATT_W-1:0] man, att;
  adc_t x;
  int checks = 0, failures = 0, nup = 0, ndn = 0;
  int gk = 0, pk = 0, ph = 0;      // model: valid samples in the window, its peak, tone phase
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (up) nup++;
    if (dn) ndn++;
  end

  agc #(.WIN_LOG2(WL)) dut (.clk, .rst, .enable(en), .manual(man), .thr_hi(16'd29491), .thr_lo(16'd13107),
                            .valid_i(vi), .x, .atten(att), .step_up(up), .step_down(dn));

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // signal at the ADC for an input level `lvl` behind attenuation code `att`
  function automatic adc_t sig(input real lvl, input int n, input logic [ATT_W-1:0] a);
    real v = lvl * $cos(0.7 * real'(n)) * $pow(10.0, -0.5 * real'(a) / 20.0);
    if (v > 32767.0) v = 32767.0;
    if (v < -32768.0) v = -32768.0;
    return adc_t'($rtoi(v));
  endfunction

  task automatic windows(input real lvl, input int nwin);
    int done = 0, m, e;
    bit eu, ed;
    while (done < nwin) begin
      @(negedge clk);
      vi = ($urandom_range(0, 3) != 0);
      x  = sig(lvl, ph, att);
      ph++;
      if (vi) begin
        m  = (x < 0) ? -int'(x) : int'(x);
        if (m > pk) pk = m;
        gk++;
        if (gk == (1 << WL)) begin
          e = int'(att); eu = 0; ed = 0;
          if (pk > 29491 && att != 6'd63) begin e++; eu = 1; end
          else if (pk < 13107 && att != 6'd0) begin e--; ed = 1; end
          @(posedge clk); #1;
          checks += 2;
          if (int'(att) != e) begin failures++; $display("FAIL window peak %0d: att=%0d exp %0d", pk, att, e); end
          if (up != eu || dn != ed) begin failures++; $display("FAIL step pulses %0d %0d", up, dn); end
          gk = 0; pk = 0;
          done++;
        end
      end
    end
    @(negedge clk) vi = 0;
  endtask

  function automatic int settle(input real lvl);
    // smallest code that brings the peak below the high threshold
    for (int a = 0; a < 64; a++) if (lvl * $pow(10.0, -0.5 * real'(a) / 20.0) <= 29491.0) return a;
    return 63;
  endfunction

  initial begin
    x = '0; man = 6'd17;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (att != 6'd17) begin failures++; $display("FAIL manual %0d", att); end
    man = 6'd0;
    @(negedge clk); @(negedge clk);
    en = 1;
    windows(80000.0, 40);      // 2.7x full scale
    checks++;
    if (att != 6'(settle(80000.0))) begin failures++; $display("FAIL loud: att=%0d exp=%0d", att, settle(80000.0)); end
    windows(2000.0, 60);       // quiet: all the way down
    checks++;
    if (att != 0) begin failures++; $display("FAIL quiet: att=%0d", att); end
    windows(32767.0 * 60.0, 70);   // clips even behind 31.5 dB
    checks++;
    if (att != 6'd63) begin failures++; $display("FAIL limit: att=%0d", att); end
    checks++;
    if (nup < 10 || ndn < 10) begin failures++; $display("FAIL steps up=%0d down=%0d", nup, ndn); end
    en = 0; man = 6'd42;
    @(negedge clk); @(negedge clk);
    checks++;
    if (att != 6'd42) begin failures++; $display("FAIL manual %0d", att); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
