// tb_ddc: a tone at the NCO frequency (f_s/8, the 20 MHz at 160 MHz case)
// with known amplitude and phase must come out as the constant baseband pair
// I = A cos(phi), Q = A sin(phi) (unity gain with shift = 5 log2 r). Runs two
// settings, the second after a run-time change of CIC ratio, FIR1 order and
// decimation, and checks that an output arrives every r*2*dec1*dec2 inputs.
module tb_ddc;
  import bpm_pkg::*;
  logic clk = 0, rst = 1, vi = 0, vo, ovr;
  adc_t x;
  ddc_cfg_t cfg;
  coef_wr_t coef;
  data_t i_o, q_o;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  ddc #(.FIR_MAX_TAPS(64)) dut (.clk, .rst, .valid_i(vi), .x, .cfg, .coef, .valid_o(vo), .i_o, .q_o, .overrun(ovr));

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  nin = 0, nout = 0;
  real A = 20000.0, phi = 0.7;
  always @(posedge clk) if (!rst && ovr) begin
    failures++;
    $display("FAIL unexpected overrun");
  end

  task automatic run(input int r, input int sh, input int t1, input int d1, input int d2, input int nouts);
    int n0, o0, skip;
    real ei, eq;
    cfg.cic_r = 6'(r); cfg.cic_shift = 6'(sh);
    cfg.fir1_taps = FIR_TAPS_W'(t1); cfg.fir1_dec = FIR_DEC_W'(d1);
    cfg.fir2_taps = 11'd1; cfg.fir2_dec = FIR_DEC_W'(d2);
    rst = 1; vi = 0;
    repeat (2) @(negedge clk);
    rst = 0; nin = 0; nout = 0;
    skip = 12;
    ei = A * $cos(phi); eq = A * $sin(phi);
    while (nout < nouts + skip) begin
      @(negedge clk);
      vi = ($urandom_range(0, 3) != 0);
      x  = adc_t'($rtoi(A * $cos(2.0 * 3.14159265358979 * real'(nin) / 8.0 + phi) + 0.5 * (($urandom_range(0, 1) == 1) ? 1.0 : -1.0)));
      if (vi) nin++;
      @(posedge clk); #1;
      if (vo) begin
        nout++;
        if (nout == skip) begin n0 = nin; o0 = nout; end
        if (nout > skip) begin
          checks++;
          if ($rtoi(real'(i_o) - ei) > 40 || $rtoi(real'(i_o) - ei) < -40 ||
              $rtoi(real'(q_o) - eq) > 40 || $rtoi(real'(q_o) - eq) < -40) begin
            failures++;
            $display("FAIL r=%0d I=%0d (%f) Q=%0d (%f)", r, i_o, ei, q_o, eq);
          end
        end
      end
    end
    checks++;
    // decimation: inputs per output
    if ((nin - n0) < (nout - o0) * r * 2 * d1 * d2 - r * 2 * d1 * d2 ||
        (nin - n0) > (nout - o0) * r * 2 * d1 * d2 + r * 2 * d1 * d2) begin
      failures++;
      $display("FAIL rate: %0d inputs for %0d outputs", nin - n0, nout - o0);
    end
  endtask

  initial begin
    cfg = '0;
    cfg.nco_fcw = NCO_W'(1) << (NCO_W - 3);
    coef = '0;
    x = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    // FIR1: 4-tap moving average
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      coef = '{we: 1'b1, sel: 1'b0, addr: 10'(k), data: (k < 4) ? COEF_W'(16384) : '0};
    end
    @(negedge clk) coef.we = 0;
    run(8, 15, 1, 1, 1, 60);     // total decimation 16, FIR1/FIR2 bypassed
    run(16, 20, 4, 2, 2, 40);    // total decimation 128, FIR1 moving average
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
