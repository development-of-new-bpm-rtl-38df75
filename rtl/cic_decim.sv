// cic_decim: cascaded integrator-comb decimator, the first DDC filter stage.
//
// ORDER integrators run at the input (ADC) rate with ACC_W-bit two's
// complement accumulators that are allowed to wrap; every r-th input the last
// integrator is sampled into ORDER comb stages (differential delay 1). The CIC
// gain r^ORDER is removed by an arithmetic right shift of `shift` bits and the
// result is saturated to OW bits. Fifth order and 48-bit accumulators follow
// the design description; r = 4..32 is what its total decimation range of
// 8..16384 implies. The output shift as a run-time setting and the
// differential delay are this design's choices. For r a power of two,
// shift = ORDER*log2(r) + IW - OW keeps full scale.
// Timing: valid_o pulses one clock after every r-th valid_i. Changing r takes
// effect at the next output.
module cic_decim
  import bpm_pkg::*;
#(
  parameter int IW    = MIX_W,
  parameter int OW    = DATA_W,
  parameter int ORDER = CIC_ORDER,
  parameter int ACC_W = CIC_ACC_W
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 valid_i,
  input  logic signed [IW-1:0] x,
  input  logic [5:0]           r,
  input  logic [5:0]           shift,
  output logic                 valid_o,
  output logic signed [OW-1:0] y
);
  logic [ACC_W-1:0] integ [ORDER];
  logic [ACC_W-1:0] dly   [ORDER];
  logic [ACC_W-1:0] comb  [ORDER+1];
  logic [5:0]       cnt;
  logic             dump;

  assign dump = valid_i && (cnt >= r - 6'd1);

  always_comb begin
    comb[0] = integ[ORDER-1];
    for (int j = 0; j < ORDER; j++) comb[j+1] = comb[j] - dly[j];
  end

  logic signed [ACC_W-1:0] shifted;
  assign shifted = $signed(comb[ORDER]) >>> shift;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < ORDER; j++) begin
        integ[j] <= '0;
        dly[j]   <= '0;
      end
      cnt     <= '0;
      valid_o <= 1'b0;
      y       <= '0;
    end else begin
      valid_o <= 1'b0;
      if (valid_i) begin
        integ[0] <= integ[0] + ACC_W'(x);
        for (int j = 1; j < ORDER; j++) integ[j] <= integ[j] + integ[j-1];
        cnt <= dump ? '0 : cnt + 6'd1;
      end
      if (dump) begin
        for (int j = 0; j < ORDER; j++) dly[j] <= comb[j];
        valid_o <= 1'b1;
        y       <= sat_data(64'(shifted));
      end
    end
  end
endmodule
