// gain_scaler: per-channel amplitude-imbalance correction of the raw ADC data.
//
// Each ADC sample is multiplied by a calibration gain (unsigned Q2.16, so
// 65536 is unity and the range is 0..<4) and saturated back to the ADC width.
// Scaling the raw samples before the downconverter follows the design
// description; the gain format and the saturation are this design's choices.
// Timing: one register stage, y/valid_o follow x/valid_i by one clock.
module gain_scaler
  import bpm_pkg::*;
#(
  parameter int W      = ADC_W,
  parameter int GW     = GAIN_W,
  parameter int FRAC   = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 valid_i,
  input  logic signed [W-1:0]  x,
  input  logic        [GW-1:0] gain,
  output logic                 valid_o,
  output logic signed [W-1:0]  y
);
  localparam logic signed [W+GW:0] MAXV = (W+GW+1)'(2 ** (W - 1) - 1);
  localparam logic signed [W+GW:0] MINV = -(W+GW+1)'(2 ** (W - 1));

  logic signed [W+GW:0] prod, scaled;

  always_comb begin
    prod   = x * $signed({1'b0, gain});
    scaled = prod >>> FRAC;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_o <= 1'b0;
      y       <= '0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        if (scaled > MAXV)      y <= MAXV[W-1:0];
        else if (scaled < MINV) y <= MINV[W-1:0];
        else                    y <= scaled[W-1:0];
      end
    end
  end
endmodule
