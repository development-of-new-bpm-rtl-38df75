// pipe_div: fully pipelined unsigned restoring divider for fractions.
//
// Computes q = floor(num * 2^F / den) for num <= den, one quotient bit per
// pipeline stage (F+1 stages, bit F first), so a new division can start on
// every clock. den = 0 gives all ones. Helper of position_calc.
// Timing: valid_o and q appear F+1 clocks after valid_i.
module pipe_div #(
  parameter int NW = 27,
  parameter int F  = 24
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          valid_i,
  input  logic [NW-1:0] num,
  input  logic [NW-1:0] den,
  output logic          valid_o,
  output logic [F:0]    q
);
  logic [NW:0]   rem [0:F+1];
  logic [NW-1:0] dv  [0:F+1];
  logic [F:0]    qs  [0:F+1];
  logic          vs  [0:F+1];

  assign rem[0] = {1'b0, num};
  assign dv[0]  = den;
  assign qs[0]  = '0;
  assign vs[0]  = valid_i;

  for (genvar j = 0; j <= F; j++) begin : g_bit
    logic          ge;
    logic [NW:0]   diff;
    assign ge   = rem[j] >= {1'b0, dv[j]};
    assign diff = ge ? rem[j] - {1'b0, dv[j]} : rem[j];
    always_ff @(posedge clk) begin
      if (rst) begin
        vs[j+1]  <= 1'b0;
        rem[j+1] <= '0;
        dv[j+1]  <= '0;
        qs[j+1]  <= '0;
      end else begin
        vs[j+1]  <= vs[j];
        rem[j+1] <= diff << 1;
        dv[j+1]  <= dv[j];
        qs[j+1]  <= qs[j] | ((F+1)'(ge) << (F - j));
      end
    end
  end

  assign valid_o = vs[F+1];
  assign q       = qs[F+1];
endmodule
