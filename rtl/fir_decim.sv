// fir_decim: run-time programmable decimating FIR with one multiplier
// (FIR1 and FIR2 of the downconverter).
//
// Every input is written to a circular sample buffer. Every `dec`-th input
// (dec = 1..16) starts one output: a single multiply-accumulate unit walks
// over the `taps` most recent samples (taps = 1..MAX_TAPS), one tap per clock,
// through a three-stage pipeline (read, multiply, accumulate), so a new output
// can start as soon as the previous one has issued its last tap. That is why
// the filter order may not exceed the number of clocks between two outputs,
// i.e. the decimation of the previous stages times `dec`, exactly as in the
// design description. A start that arrives while the unit is still issuing
// taps (other than its last one) is dropped and flagged on `overrun`. taps = 1 bypasses the filter: the input is
// only decimated, with no multiplication. Coefficients are signed Q2.16 in a
// RAM written through coef_we/coef_addr/coef_data at any time; coefficient k
// weights the sample k inputs back. The result is shifted by COEF_FRAC and
// saturated to W bits.
// The sample buffer holds 2*MAX_TAPS words so that samples arriving during a
// computation never overwrite one still needed; this and the word formats are
// this design's choices.
// Timing: with taps > 1, valid_o pulses taps+3 clocks after the starting
// input; with taps = 1, one clock after it.
module fir_decim
  import bpm_pkg::*;
#(
  parameter int MAX_TAPS = 1024,
  parameter int W        = DATA_W,
  parameter int CW       = COEF_W,
  parameter int CFRAC    = COEF_FRAC
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          valid_i,
  input  logic signed [W-1:0]           x,
  input  logic [FIR_DEC_W-1:0]          dec,
  input  logic [FIR_TAPS_W-1:0]         taps,
  input  logic                          coef_we,
  input  logic [$clog2(MAX_TAPS)-1:0]   coef_addr,
  input  logic signed [CW-1:0]          coef_data,
  output logic                          valid_o,
  output logic signed [W-1:0]           y,
  output logic                          overrun
);
  localparam int CA  = $clog2(MAX_TAPS);
  localparam int BA  = CA + 1;
  localparam int ACW = W + CW + CA + 1;

  logic signed [CW-1:0] cmem [2**CA];
  logic signed [W-1:0]  xmem [2**BA];

  logic [BA-1:0]        wp, base;
  logic [FIR_DEC_W-1:0] dcnt;
  logic                 due, busy, bypass;
  logic [FIR_TAPS_W-1:0] k;

  // pipeline registers
  logic                 s1_v, s1_first, s1_last;
  logic signed [W-1:0]  s1_x;
  logic signed [CW-1:0] s1_c;
  logic                 s2_v, s2_first, s2_last;
  logic signed [W+CW-1:0] s2_p;
  logic signed [ACW-1:0]  acc, acc_next;

  assign bypass = (taps <= FIR_TAPS_W'(1));
  assign due    = valid_i && (dcnt + FIR_DEC_W'(1) >= dec);

  always_ff @(posedge clk) begin
    if (coef_we) cmem[coef_addr] <= coef_data;
    if (valid_i) xmem[wp] <= x;
  end

  // read stage: registered RAM reads
  always_ff @(posedge clk) begin
    s1_x <= xmem[base - BA'(k)];
    s1_c <= cmem[CA'(k)];
  end

  assign acc_next = s2_first ? ACW'(s2_p) : acc + ACW'(s2_p);

  always_ff @(posedge clk) begin
    if (rst) begin
      wp       <= '0;
      base     <= '0;
      dcnt     <= '0;
      busy     <= 1'b0;
      k        <= '0;
      s1_v     <= 1'b0;
      s1_first <= 1'b0;
      s1_last  <= 1'b0;
      s2_v     <= 1'b0;
      s2_first <= 1'b0;
      s2_last  <= 1'b0;
      s2_p     <= '0;
      acc      <= '0;
      valid_o  <= 1'b0;
      y        <= '0;
      overrun  <= 1'b0;
    end else begin
      valid_o <= 1'b0;
      overrun <= 1'b0;
      if (valid_i) begin
        wp   <= wp + BA'(1);
        dcnt <= due ? '0 : dcnt + FIR_DEC_W'(1);
      end

      // issue stage
      s1_v     <= busy;
      s1_first <= busy && (k == '0);
      s1_last  <= busy && (k == taps - FIR_TAPS_W'(1));
      if (busy) begin
        if (k == taps - FIR_TAPS_W'(1)) busy <= 1'b0;
        else                            k    <= k + FIR_TAPS_W'(1);
      end
      if (due) begin
        if (bypass) begin
          valid_o <= 1'b1;
          y       <= x;
        end else if (busy && k != taps - FIR_TAPS_W'(1)) begin
          overrun <= 1'b1;
        end else begin
          busy <= 1'b1;
          k    <= '0;
          base <= wp;
        end
      end

      // multiply stage
      s2_v     <= s1_v;
      s2_first <= s1_first;
      s2_last  <= s1_last;
      s2_p     <= s1_x * s1_c;

      // accumulate stage
      if (s2_v) begin
        acc <= acc_next;
        if (s2_last) begin
          valid_o <= 1'b1;
          y       <= sat_data(64'(acc_next >>> CFRAC));
        end
      end
    end
  end
endmodule
