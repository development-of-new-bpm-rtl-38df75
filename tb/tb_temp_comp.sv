// tb_temp_comp: random amplitudes, temperatures and coefficients; each output
// must equal amp * (1 + k * (T - T_ref)) within one LSB (plus the truncation
// of the gain to 2^-23), one clock after its input, with saturation at both
// ends of the gain range and exact pass-through while disabled.
module tb_temp_comp;
  import bpm_pkg::*;
  logic clk = 0, rst = 1, en = 0, vi = 0, vo;
  logic signed [15:0] temp = '0, tref = 16'sd6400;
  logic signed [23:0] k [N_CH];
  amp_t ai [N_CH], ao [N_CH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  temp_comp dut (.clk, .rst, .enable(en), .temp, .temp_ref(tref), .k, .valid_i(vi), .amp_i(ai),
                 .valid_o(vo), .amp_o(ao));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real expect_amp(input real a, input real kk, input real dt, input bit on);
    real g;
    if (!on) return a;
    g = 1.0 + kk * dt / 4294967296.0;
    if (g < 0.0) g = 0.0;
    if (g > 2.0) g = 2.0;
    a = a * g;
    if (a > 16777215.0) a = 16777215.0;
    return a;
  endfunction

  initial begin
    real e, tol;
    for (int c = 0; c < N_CH; c++) begin k[c] = '0; ai[c] = '0; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 600; n++) begin
      // settings change, then settle for the two registered steps of the gain
      @(negedge clk);
      vi = 0;
      en = (n % 5 != 0);
      temp = 16'($urandom_range(0, 60 * 256));
      for (int c = 0; c < N_CH; c++)
        k[c] = (n % 50 == 7) ? 24'sh7FFFFF : (n % 50 == 8) ? -24'sh7FFFFF
                             : 24'($signed($urandom_range(0, 200000)) - 100000);
      repeat (3) @(negedge clk);
      vi = 1;
      for (int c = 0; c < N_CH; c++) ai[c] = (n % 7 == 0) ? 24'hFFFFFF : 24'($urandom_range(0, 2**24 - 1));
      @(posedge clk); #1;
      vi = 0;
      checks++;
      if (vo !== 1'b1) begin failures++; $display("FAIL no valid_o"); end
      for (int c = 0; c < N_CH; c++) begin
        e = expect_amp(real'(ai[c]), real'(k[c]), real'(temp - tref), en);
        // truncation: never above the exact value, at most 1 + a * 2^-23 below
        tol = en ? 1.01 + real'(ai[c]) / 8388608.0 : 0.0;
        checks++;
        if (real'(ao[c]) - e > 0.01 || e - real'(ao[c]) > tol) begin
          failures++;
          $display("FAIL c=%0d en=%0d a=%0d k=%0d dT=%0d: %0d exp %f", c, en, ai[c], k[c], temp - tref, ao[c], e);
        end
      end
    end
    @(posedge clk); #1;
    checks++;
    if (vo) begin failures++; $display("FAIL valid_o without input"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
