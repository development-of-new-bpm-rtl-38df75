// tb_cordic_amp: random and corner I/Q pairs against sqrt(I^2+Q^2), one pair
// per clock, checking the STAGES+2 clock latency.
module tb_cordic_amp;
  import bpm_pkg::*;
  logic clk = 0, rst = 1, vi = 0, vo;
  data_t i_i, q_i;
  amp_t amp;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  cordic_amp dut (.clk, .rst, .valid_i(vi), .i_i, .q_i, .valid_o(vo), .amp);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real  exp_q[$];
  int   t_q[$];
  always @(posedge clk) if (!rst && vi) begin
    exp_q.push_back($sqrt(real'(i_i) * real'(i_i) + real'(q_i) * real'(q_i)));
    t_q.push_back(cyc);
  end
  always @(posedge clk) if (!rst && vo) begin
    real e, d;
    int  t0;
    e  = exp_q.pop_front();
    t0 = t_q.pop_front();
    d  = real'(amp) - e;
    checks += 2;
    if (d > 3.0 + e * 1e-5 || d < -(3.0 + e * 1e-5)) begin
      failures++;
      $display("FAIL amp=%0d exp=%f", amp, e);
    end
    if (cyc - t0 != 20) begin
      failures++;
      $display("FAIL latency %0d", cyc - t0);
    end
  end

  initial begin
    i_i = '0; q_i = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      vi = ($urandom_range(0, 4) != 0);
      case (n)
        0: begin i_i = DATA_W'(-8388608); q_i = DATA_W'(-8388608); end
        1: begin i_i = DATA_W'(8388607);  q_i = '0; end
        2: begin i_i = '0; q_i = DATA_W'(-8388608); end
        3: begin i_i = '0; q_i = '0; end
        default: begin
          i_i = (n % 2) ? DATA_W'($urandom) : DATA_W'($urandom_range(0, 2000) - 1000);
          q_i = (n % 3) ? DATA_W'($urandom) : DATA_W'($urandom_range(0, 2000) - 1000);
        end
      endcase
    end
    @(negedge clk) vi = 0;
    repeat (30) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
