// tb_nco: compares cosine and sine with the exact values of the accumulated
// phase, checks the pipeline latency and a run-time frequency change.
module tb_nco;
  import bpm_pkg::*;
  localparam int ST = 18;
  logic clk = 0, rst = 1, vi = 0, vo;
  logic [NCO_W-1:0] fcw;
  logic signed [TRIG_W-1:0] c, s;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  nco #(.STAGES(ST)) dut (.clk, .rst, .valid_i(vi), .fcw, .valid_o(vo), .cos_o(c), .sin_o(s));

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phases of the accepted inputs, in order
  longint ph_q[$];
  longint ph;
  int     t_in[$];
  int     cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst && vi) begin
    ph_q.push_back(ph);
    t_in.push_back(cyc);
    ph = (ph + longint'(fcw)) % (longint'(1) << NCO_W);
  end

  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction
  real amp = real'((1 << (TRIG_W - 1)) - 1);
  always @(posedge clk) if (!rst && vo) begin
    real a, ec, es;
    longint p;
    int t0;
    p  = ph_q.pop_front();
    t0 = t_in.pop_front();
    a  = 2.0 * 3.14159265358979 * real'(p) / real'(longint'(1) << NCO_W);
    ec = amp * $cos(a);
    es = amp * $sin(a);
    checks += 3;
    if (fabs(real'(c) - ec) > 3.0 || fabs(real'(s) - es) > 3.0) begin
      failures++;
      $display("FAIL phase=%0d cos=%0d (%f) sin=%0d (%f)", p, c, ec, s, es);
    end
    if (cyc - t0 != ST + 2) begin
      failures++;
      $display("FAIL latency %0d", cyc - t0);
    end
    if (fabs(real'(c) * real'(c) + real'(s) * real'(s) - amp * amp) > amp * 16.0) failures++;
  end

  initial begin
    ph = 0;
    fcw = NCO_W'(16777216);  // f_s/8
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      vi = ($urandom_range(0, 3) != 0);
      if (n == 1000) fcw = NCO_W'($urandom);
      if (n == 2000) fcw = NCO_W'(1234567);
    end
    @(negedge clk) vi = 0;
    repeat (ST + 5) @(posedge clk);
    if (ph_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
