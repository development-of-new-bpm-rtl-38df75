// agc: automatic gain control of one RFFE channel.
//
// The peak of |x| is measured over windows of 2^WIN_LOG2 ADC samples. At the
// end of each window, with `enable` set, the RFFE attenuation code is raised
// by one step when the peak exceeded thr_hi (risk of ADC clipping) and lowered
// by one step when it stayed below thr_lo, within 0..2^ATT_W-1. With enable
// low the code follows `manual`. The document gives the function (measure the
// ADC level, control the RFFE gain); the peak detector, the two thresholds,
// the window and the 6-bit code in 0.5 dB steps (0..31.5 dB, the range of the
// stripline front end) are this design's choices.
// Timing: atten changes on the clock after the last sample of a window;
// step_up / step_down pulse at the same time.
module agc
  import bpm_pkg::*;
#(
  parameter int WIN_LOG2 = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enable,
  input  logic [ATT_W-1:0] manual,
  input  logic [15:0]      thr_hi,
  input  logic [15:0]      thr_lo,
  input  logic             valid_i,
  input  adc_t             x,
  output logic [ATT_W-1:0] atten,
  output logic             step_up,
  output logic             step_down
);
  logic [WIN_LOG2-1:0] cnt;
  logic [15:0]         peak, mag, peak_now;
  logic                win_end;

  assign mag      = x[ADC_W-1] ? 16'(-x) : 16'(x);   // -32768 maps to 32768
  assign peak_now = (mag > peak) ? mag : peak;
  assign win_end  = valid_i && (cnt == '1);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      peak      <= '0;
      atten     <= '0;
      step_up   <= 1'b0;
      step_down <= 1'b0;
    end else begin
      step_up   <= 1'b0;
      step_down <= 1'b0;
      if (valid_i) begin
        cnt  <= cnt + 1'b1;
        peak <= win_end ? '0 : peak_now;
      end
      if (!enable) begin
        atten <= manual;
      end else if (win_end) begin
        if (peak_now > thr_hi && atten != '1) begin
          atten   <= atten + 1'b1;
          step_up <= 1'b1;
        end else if (peak_now < thr_lo && atten != '0) begin
          atten     <= atten - 1'b1;
          step_down <= 1'b1;
        end
      end
    end
  end
endmodule
