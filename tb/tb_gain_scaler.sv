// tb_gain_scaler: random samples and gains against a reference product with
// saturation; checks the one-clock latency.
module tb_gain_scaler;
  import bpm_pkg::*;
  logic clk = 0, rst = 1, vi = 0, vo;
  adc_t x, y;
  logic [GAIN_W-1:0] g;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  gain_scaler dut (.clk, .rst, .valid_i(vi), .x, .gain(g), .valid_o(vo), .y);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    x = '0; g = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      vi = 1;
      x  = adc_t'($urandom);
      g  = (n % 3 == 0) ? GAIN_W'($urandom) : GAIN_W'(65536 + int'($urandom_range(0, 8000)) - 4000);
      e  = (longint'(x) * longint'(g)) >>> 16;
      if (e > 32767) e = 32767;
      if (e < -32768) e = -32768;
      @(posedge clk); #1;
      checks++;
      if (!vo || y !== adc_t'(e)) begin
        failures++;
        $display("FAIL x=%0d g=%0d y=%0d exp=%0d", x, g, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
