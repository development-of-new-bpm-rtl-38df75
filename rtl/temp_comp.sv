// temp_comp: feed-forward temperature correction of the four channel
// amplitudes.
//
// What it does: the gain of each analog channel of the RF front end drifts
// with the board temperature (about 0.3 % per degree in the measurements
// the design is based on), which moves the computed position by a few um per
// degree. With the front end's temperature sensor reading and a linear
// coefficient per channel, each amplitude is multiplied by
//   g_c = 1 + k_c * (T - T_ref)
// before the position is formed, so the drift cancels in the ratios.
//
// How: g_c is recomputed every clock from the current temperature and
// settings (two registered steps) and held as unsigned Q1.23; the amplitude
// multiply is one more registered step, applied per ADC channel, i.e. per
// analog path, before the crossbar re-swap.
//
// Interface and timing:
//   temp      signed, 1/256 degree per LSB (Q8.8), from the front-end sensor;
//             may change at any time, takes effect 2 clocks later
//   temp_ref  same format, temperature at which the channels were calibrated
//   k[c]      signed, relative gain change per LSB of (T - T_ref), in units
//             of 2^-32 (0.3 %/degree is about 50000)
//   enable    0: g_c = 1 exactly (amplitudes pass unchanged)
//   valid_i/amp_i -> valid_o/amp_o one clock later; results saturate to
//   AMP_W bits, g_c is limited to 0..2 - 2^-23.
//
// From the design description: the correction of temperature-induced drift
// in feed-forward mode in firmware, from on-board temperature sensors and
// known temperature coefficients. Own choices: a linear model per channel,
// applied to the amplitudes, the sensor and coefficient formats, and the
// point in the chain.
module temp_comp
  import bpm_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              enable,
  input  logic signed [15:0] temp,
  input  logic signed [15:0] temp_ref,
  input  logic signed [23:0] k [N_CH],
  input  logic              valid_i,
  input  amp_t              amp_i [N_CH],
  output logic              valid_o,
  output amp_t              amp_o [N_CH]
);
  localparam int G_FRAC = 23;

  logic signed [16:0] dt;
  logic [G_FRAC:0]    g [N_CH];      // unsigned Q1.23

  always_ff @(posedge clk) begin
    if (rst) dt <= '0;
    else     dt <= 17'(temp) - 17'(temp_ref);
  end

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic signed [40:0] kd;          // k * dT, units of 2^-32
    logic signed [41:0] gs;          // 1 + k * dT, units of 2^-23
    logic [AMP_W+G_FRAC:0] prod;

    assign kd = 41'(k[c]) * 41'(dt);
    assign gs = (42'sd1 <<< G_FRAC) + 42'(kd >>> 9);

    always_ff @(posedge clk) begin
      if (rst || !enable)            g[c] <= (G_FRAC+1)'(1) << G_FRAC;
      else if (gs < 0)               g[c] <= '0;
      else if (gs > 42'(2 ** (G_FRAC + 1) - 1))
                                     g[c] <= '1;
      else                           g[c] <= gs[G_FRAC:0];
    end

    assign prod = (AMP_W+G_FRAC+1)'(amp_i[c]) * (AMP_W+G_FRAC+1)'(g[c]);

    always_ff @(posedge clk) begin
      if (rst)                          amp_o[c] <= '0;
      else if (valid_i) begin
        if (prod[AMP_W+G_FRAC:G_FRAC] > (AMP_W+1)'(2 ** AMP_W - 1))
                                        amp_o[c] <= '1;
        else                            amp_o[c] <= prod[AMP_W+G_FRAC-1:G_FRAC];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) valid_o <= 1'b0;
    else     valid_o <= valid_i;
  end
endmodule
