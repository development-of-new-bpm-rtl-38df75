// position_calc: beam position and charge from the four button amplitudes.
//
// X = kx * ((A+D) - (B+C)) / S and Y = ky * ((A+B) - (C+D)) / S, with
// S = A+B+C+D, are produced as IEEE-754 single-precision numbers in mm, and
// the charge as the fixed-point integer (S * kq) >> 16. This output format
// follows the design description (positions in single-precision floating
// point, charge as a fixed-point integer); the difference-over-sum formula,
// the button layout (A top right, B top left, C bottom left, D bottom right)
// and the Q8.16 calibration factors (10 mm by default in the registers) are
// this design's choices. The ratio is computed to F fraction bits by a
// pipelined divider, multiplied by the geometry factor and converted to
// floating point by truncation. S = 0 gives X = Y = 0.
// Timing: fully pipelined, latency F+4 clocks (28 by default), one result per
// clock. cfg is used F+2 clocks after the amplitudes, so change it only while
// no results are in flight if every result must use one set of factors.
module position_calc
  import bpm_pkg::*;
#(
  parameter int F = 24
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        valid_i,
  input  amp_t        amp [N_CH],    // A, B, C, D
  input  pos_cfg_t    cfg,
  output logic        valid_o,
  output logic [31:0] x_f,
  output logic [31:0] y_f,
  output logic [31:0] charge
);
  localparam int SW = AMP_W + 3;     // width of sums and differences
  localparam int PW = F + 1 + 24;    // ratio times geometry factor

  // Stage 0: sums and differences
  logic [SW-1:0] s0_sum, s0_ax, s0_ay;
  logic          s0_v, s0_nx, s0_ny;

  always_ff @(posedge clk) begin
    logic signed [SW+1:0] dx, dy;
    if (rst) begin
      s0_v <= 1'b0; s0_sum <= '0; s0_ax <= '0; s0_ay <= '0; s0_nx <= 1'b0; s0_ny <= 1'b0;
    end else begin
      dx = $signed({2'b0, SW'(amp[0]) + SW'(amp[3])}) - $signed({2'b0, SW'(amp[1]) + SW'(amp[2])});
      dy = $signed({2'b0, SW'(amp[0]) + SW'(amp[1])}) - $signed({2'b0, SW'(amp[2]) + SW'(amp[3])});
      s0_v   <= valid_i;
      s0_sum <= SW'(amp[0]) + SW'(amp[1]) + SW'(amp[2]) + SW'(amp[3]);
      s0_nx  <= dx < 0;
      s0_ny  <= dy < 0;
      s0_ax  <= (dx < 0) ? SW'(-dx) : SW'(dx);
      s0_ay  <= (dy < 0) ? SW'(-dy) : SW'(dy);
    end
  end

  // Divisions
  logic       dvx, dvy;
  logic [F:0] rx, ry;

  pipe_div #(.NW(SW), .F(F)) u_divx (
    .clk, .rst, .valid_i(s0_v), .num(s0_ax), .den(s0_sum), .valid_o(dvx), .q(rx)
  );
  pipe_div #(.NW(SW), .F(F)) u_divy (
    .clk, .rst, .valid_i(s0_v), .num(s0_ay), .den(s0_sum), .valid_o(dvy), .q(ry)
  );

  // Side data delayed along the divider
  logic [SW-1:0] d_sum [F+1];
  logic          d_nx  [F+1];
  logic          d_ny  [F+1];
  always_ff @(posedge clk) begin
    d_sum[0] <= s0_sum;
    d_nx[0]  <= s0_nx;
    d_ny[0]  <= s0_ny;
    for (int j = 1; j <= F; j++) begin
      d_sum[j] <= d_sum[j-1];
      d_nx[j]  <= d_nx[j-1];
      d_ny[j]  <= d_ny[j-1];
    end
  end

  // Stage F+2: scale by the geometry factors and the charge factor
  logic          m_v, m_nx, m_ny;
  logic [PW-1:0] m_px, m_py;
  logic [SW+23:0] m_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      m_v <= 1'b0; m_nx <= 1'b0; m_ny <= 1'b0; m_px <= '0; m_py <= '0; m_q <= '0;
    end else begin
      m_v  <= dvx;
      m_nx <= d_nx[F];
      m_ny <= d_ny[F];
      m_px <= (d_sum[F] == '0) ? '0 : PW'(rx) * PW'(cfg.kx);
      m_py <= (d_sum[F] == '0) ? '0 : PW'(ry) * PW'(cfg.ky);
      m_q  <= (SW+24)'(d_sum[F]) * (SW+24)'(cfg.kq);
    end
  end

  // Unsigned fixed point (value = v * 2^-(F+16)) to single precision
  function automatic logic [31:0] to_float(input logic neg, input logic [PW-1:0] v);
    int          msb;
    logic [PW-1:0] norm;
    logic [7:0]  e;
    msb = -1;
    for (int b = 0; b < PW; b++) if (v[b]) msb = b;
    if (msb < 0) return 32'h0000_0000;
    norm = v << (PW - 1 - msb);            // leading one at bit PW-1
    e    = 8'(msb - (F + 16) + 127);
    return {neg, e, norm[PW-2 -: 23]};
  endfunction

  // Stage F+3: conversion and output
  always_ff @(posedge clk) begin
    if (rst) begin
      valid_o <= 1'b0; x_f <= '0; y_f <= '0; charge <= '0;
    end else begin
      valid_o <= m_v;
      x_f     <= to_float(m_nx, m_px);
      y_f     <= to_float(m_ny, m_py);
      charge  <= (|m_q[SW+23:48]) ? 32'hFFFF_FFFF : m_q[47:16];
    end
  end

  // dvy runs in lockstep with dvx
  wire unused_ok = dvy;
endmodule
