// cordic_amp: amplitude of the baseband I/Q pair by CORDIC vectoring.
//
// The vector is first mirrored into the right half plane (magnitude is
// unchanged), then STAGES micro-rotations drive its y component to zero; the
// x component is then K*sqrt(I^2+Q^2) with K ~ 1.64676, which a constant
// multiply by round(2^17/K) removes. Two guard bits are kept below the LSB.
// Using the CORDIC algorithm follows the design description; the pipelined
// form and the stage count are this design's choices. The error is a few LSBs.
// Timing: fully pipelined, one result per clock, latency STAGES+2 clocks.
module cordic_amp
  import bpm_pkg::*;
#(
  parameter int W      = DATA_W,
  parameter int OW     = AMP_W,
  parameter int STAGES = 18
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                valid_i,
  input  logic signed [W-1:0] i_i,
  input  logic signed [W-1:0] q_i,
  output logic                valid_o,
  output logic [OW-1:0]       amp
);
  localparam int IW = W + 4;   // sign, growth and 2 guard bits
  localparam logic [17:0] INV_K = 18'd79594;   // 2^17 / K

  logic signed [IW-1:0] xs [0:STAGES];
  logic signed [IW-1:0] ys [0:STAGES];
  logic                 vs [0:STAGES];

  always_ff @(posedge clk) begin
    if (rst) begin
      vs[0] <= 1'b0;
      xs[0] <= '0;
      ys[0] <= '0;
    end else begin
      vs[0] <= valid_i;
      if (i_i < 0) begin
        xs[0] <= -(IW'(i_i) <<< 2);
        ys[0] <= -(IW'(q_i) <<< 2);
      end else begin
        xs[0] <= IW'(i_i) <<< 2;
        ys[0] <= IW'(q_i) <<< 2;
      end
    end
  end

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    always_ff @(posedge clk) begin
      if (rst) begin
        vs[s+1] <= 1'b0;
        xs[s+1] <= '0;
        ys[s+1] <= '0;
      end else begin
        vs[s+1] <= vs[s];
        if (ys[s] >= 0) begin
          xs[s+1] <= xs[s] + (ys[s] >>> s);
          ys[s+1] <= ys[s] - (xs[s] >>> s);
        end else begin
          xs[s+1] <= xs[s] - (ys[s] >>> s);
          ys[s+1] <= ys[s] + (xs[s] >>> s);
        end
      end
    end
  end

  logic [IW+17:0] scaled;
  assign scaled = ($unsigned(xs[STAGES]) * INV_K) >> (17 + 2);

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_o <= 1'b0;
      amp     <= '0;
    end else begin
      valid_o <= vs[STAGES];
      amp     <= (scaled > (IW+18)'({OW{1'b1}})) ? {OW{1'b1}} : OW'(scaled);
    end
  end
endmodule
