// tb_comp_fir: random input against a reference convolution with the
// compensation coefficients, output on every second input; also checks the
// unity DC gain with a constant input.
module tb_comp_fir;
  import bpm_pkg::*;
  localparam longint C[9] = '{2201, -4812, -6381, 20705, 42110, 20705, -6381, -4812, 2201};
  logic clk = 0, rst = 1, vi = 0, vo;
  data_t x, y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  comp_fir dut (.clk, .rst, .valid_i(vi), .x, .valid_o(vo), .y);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint xs[$];
  longint exp_q[$];

  initial begin
    x = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      vi = ($urandom_range(0, 2) != 0);
      if (n < 2000) x = DATA_W'($urandom_range(0, 2 * 4000000) - 4000000);
      else          x = DATA_W'(-1234567);
      if (vi) begin
        xs.push_back(longint'(x));
        if (xs.size() % 2 == 0) begin
          longint acc;
          acc = 0;
          for (int k = 0; k < 9; k++) if (xs.size() - 1 - k >= 0) acc += C[k] * xs[xs.size()-1-k];
          exp_q.push_back(acc >>> 16);
        end
      end
      @(posedge clk); #1;
      if (vo) begin
        longint e;
        e = exp_q.pop_front();
        checks++;
        if (longint'(y) != e) begin
          failures++;
          $display("FAIL y=%0d exp=%0d", y, e);
        end
      end
    end
    checks++;
    if (y != -1234567 || exp_q.size() != 0) begin
      failures++;
      $display("FAIL DC gain: y=%0d", y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
