// comp_fir: CIC droop compensation filter, 8th order (9 taps), decimation by 2.
//
// A direct-form FIR with fixed symmetric coefficients in signed Q2.16 (sum
// 65536, unity DC gain). Every second valid input produces an output, computed
// from the 9 most recent inputs with parallel multipliers and saturated to W
// bits. Order and decimation follow the design description; its coefficients
// are not given. The default set here is a least-squares fit of the composite
// (5th-order CIC times this filter) to a flat response up to 0.1 of this
// filter's input rate, with a lightly weighted stop band above 0.36. It meets
// the target of a composite flatness better than 0.01 dB from 0 to 0.01 f_s
// at CIC ratios 4 and 8 (0.004 / 0.008 dB); at r = 16 the deviation over that
// band is 0.5 dB. They are a parameter, not a run-time setting.
// Timing: valid_o pulses one clock after every second valid_i.
module comp_fir
  import bpm_pkg::*;
#(
  parameter int    W     = DATA_W,
  parameter int    NTAPS = 9,
  parameter coef_t COEF [NTAPS] = '{18'sd2201, -18'sd4812, -18'sd6381, 18'sd20705, 18'sd42110,
                                    18'sd20705, -18'sd6381, -18'sd4812, 18'sd2201}
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                valid_i,
  input  logic signed [W-1:0] x,
  output logic                valid_o,
  output logic signed [W-1:0] y
);
  logic signed [W-1:0] sr [NTAPS];   // sr[0] newest
  logic                phase;
  logic signed [W+COEF_W+5:0] acc;

  always_comb begin
    acc = (W + COEF_W + 6)'(x) * COEF[0];
    for (int k = 1; k < NTAPS; k++) acc += (W + COEF_W + 6)'(sr[k-1]) * COEF[k];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) sr[k] <= '0;
      phase   <= 1'b0;
      valid_o <= 1'b0;
      y       <= '0;
    end else begin
      valid_o <= 1'b0;
      if (valid_i) begin
        sr[0] <= x;
        for (int k = 1; k < NTAPS; k++) sr[k] <= sr[k-1];
        phase <= ~phase;
        if (phase) begin
          valid_o <= 1'b1;
          y       <= sat_data(64'(acc >>> COEF_FRAC));
        end
      end
    end
  end
endmodule
