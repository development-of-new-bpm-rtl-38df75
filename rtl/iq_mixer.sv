// iq_mixer: mixes the IF samples down to baseband.
//
// I = x*cos, Q = -x*sin, both scaled by 2^-(TRIG_W-2) so that a full-scale
// input with a full-scale oscillator reaches about half of the MIX_W range
// (the other half of the product is the 2f image that the CIC removes).
// Mixing with the NCO's cosine and sine follows the design description; the
// sign of Q and the scaling are this design's choices.
// Timing: one register stage; x and the oscillator values must arrive together.
module iq_mixer
  import bpm_pkg::*;
#(
  parameter int W  = ADC_W,
  parameter int TW = TRIG_W,
  parameter int OW = MIX_W
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 valid_i,
  input  logic signed [W-1:0]  x,
  input  logic signed [TW-1:0] cos_i,
  input  logic signed [TW-1:0] sin_i,
  output logic                 valid_o,
  output logic signed [OW-1:0] i_o,
  output logic signed [OW-1:0] q_o
);
  localparam int SH = W + TW - OW;   // keep the top OW bits of the product
  logic signed [W+TW-1:0] pi, pq;

  always_comb begin
    pi = x * cos_i;
    pq = x * sin_i;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_o <= 1'b0;
      i_o     <= '0;
      q_o     <= '0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        i_o <= OW'(pi >>> SH);
        q_o <= OW'(-(pq >>> SH));
      end
    end
  end
endmodule
