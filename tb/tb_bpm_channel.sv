// tb_bpm_channel: one channel chain with a calibration gain of 0.75; a tone
// of amplitude A at the NCO frequency must give amplitude 0.75*A from the
// CORDIC, independent of the tone's phase.
module tb_bpm_channel;
  import bpm_pkg::*;
  logic clk = 0, rst = 1, vi = 0, iqv, av, ovr;
  adc_t x;
  ddc_cfg_t cfg;
  coef_wr_t coef;
  data_t i_o, q_o;
  amp_t amp;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bpm_channel #(.FIR_MAX_TAPS(64)) dut (
    .clk, .rst, .adc_valid(vi), .adc(x), .gain(GAIN_W'(49152)), .cfg, .coef,
    .iq_valid(iqv), .i_o, .q_o, .amp_valid(av), .amp, .overrun(ovr)
  );

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nin, nout;
    real A, phi, e;
    cfg = '0;
    cfg.nco_fcw = NCO_W'(1) << (NCO_W - 3);
    cfg.cic_r = 6'd4; cfg.cic_shift = 6'd10;
    cfg.fir1_taps = 11'd1; cfg.fir1_dec = 5'd2;
    cfg.fir2_taps = 11'd1; cfg.fir2_dec = 5'd1;
    coef = '0; x = '0;
    for (int run = 0; run < 3; run++) begin
      A   = (run == 0) ? 30000.0 : (run == 1) ? 5000.0 : 18000.0;
      phi = 1.1 * real'(run) - 0.4;
      e   = 0.75 * A;
      rst = 1;
      repeat (2) @(negedge clk);
      rst = 0; nin = 0; nout = 0;
      while (nout < 60) begin
        @(negedge clk);
        vi = 1;
        x  = adc_t'($rtoi(A * $cos(2.0 * 3.14159265358979 * real'(nin) / 8.0 + phi)));
        nin++;
        @(posedge clk); #1;
        if (av) begin
          nout++;
          if (nout > 10) begin
            checks++;
            if (real'(amp) > e * 1.003 + 4.0 || real'(amp) < e * 0.997 - 4.0) begin
              failures++;
              $display("FAIL A=%f amp=%0d exp=%f", A, amp, e);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
