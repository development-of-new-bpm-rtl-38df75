// tb_iq_mixer: random samples and oscillator values against I = x*cos and
// Q = -x*sin scaled to the output width.
module tb_iq_mixer;
  import bpm_pkg::*;
  logic clk = 0, rst = 1, vi = 0, vo;
  adc_t x;
  logic signed [TRIG_W-1:0] c, s;
  logic signed [MIX_W-1:0] i_o, q_o;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  iq_mixer dut (.clk, .rst, .valid_i(vi), .x, .cos_i(c), .sin_i(s), .valid_o(vo), .i_o, .q_o);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ei, eq;
    x = '0; c = '0; s = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      vi = 1;
      x = adc_t'($urandom);
      c = TRIG_W'($urandom_range(0, 262142) - 131071);
      s = TRIG_W'($urandom_range(0, 262142) - 131071);
      ei = (longint'(x) * longint'(c)) >>> 16;
      eq = -((longint'(x) * longint'(s)) >>> 16);
      @(posedge clk); #1;
      checks += 2;
      if (!vo || i_o !== MIX_W'(ei) || q_o !== MIX_W'(eq)) begin
        failures++;
        $display("FAIL x=%0d c=%0d s=%0d i=%0d/%0d q=%0d/%0d", x, c, s, i_o, ei, q_o, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
