// nco: numerically controlled oscillator of the digital downconverter.
//
// A PHASE_W-bit phase accumulator advances by the frequency control word fcw
// on every valid sample, so f_out = fcw * f_s / 2^PHASE_W. With the default
// 27 bits at 160 MHz the step is 1.19 Hz, which meets the 2 Hz tuning
// resolution of the design description. fcw may change at any time.
// Cosine and sine are produced by a pipelined CORDIC rotator (the description
// does not say how the waveforms are generated): the phase is folded into
// [-pi/2, pi/2), the vector (1/K, 0) is rotated by STAGES micro-rotations, and
// the result is unfolded again; four guard bits are carried below the output
// LSB and rounded off at the end. Amplitude is 2^(OUT_W-1)-1 within a few LSBs.
// Timing: cos_o/sin_o/valid_o appear STAGES+2 clocks after valid_i and belong
// to the phase in use when that valid_i was seen (phase 0 for the first one).
module nco
  import bpm_pkg::*;
#(
  parameter int PHASE_W = NCO_W,
  parameter int OUT_W   = TRIG_W,
  parameter int STAGES  = 18
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    valid_i,
  input  logic [PHASE_W-1:0]      fcw,
  output logic                    valid_o,
  output logic signed [OUT_W-1:0] cos_o,
  output logic signed [OUT_W-1:0] sin_o
);
  localparam int GB = 4;           // guard bits below the output LSB
  localparam int IW = OUT_W + 3 + GB;   // internal vector width
  localparam int AW = 32;          // angle width: 2^32 = one turn

  // atan(2^-i) in units of 2^-32 turns
  function automatic logic [AW-1:0] atan_tab(input int i);
    logic [AW-1:0] t [0:23];
    t = '{32'h20000000, 32'h12E4051E, 32'h09FB385B, 32'h051111D4,
          32'h028B0D43, 32'h0145D7E1, 32'h00A2F61E, 32'h00517C55,
          32'h0028BE53, 32'h00145F2F, 32'h000A2F98, 32'h000517CC,
          32'h00028BE6, 32'h000145F3, 32'h0000A2FA, 32'h0000517D,
          32'h000028BE, 32'h0000145F, 32'h00000A30, 32'h00000518,
          32'h0000028C, 32'h00000146, 32'h000000A3, 32'h00000051};
    return t[i];
  endfunction

  // 1/K scaled to the output amplitude, K = prod sqrt(1+2^-2i) ~ 1.64676
  localparam logic signed [IW-1:0] X0 =
    IW'(longint'(((64'd1 << (OUT_W - 1 + GB)) - 1) * 64'd39797) / 64'd65536);

  logic [PHASE_W-1:0] phase;
  always_ff @(posedge clk) begin
    if (rst)          phase <= '0;
    else if (valid_i) phase <= phase + fcw;
  end

  // Stage 0: fold the angle into [-1/4, 1/4) turn
  logic [AW-1:0] ang_full;
  assign ang_full = {phase, {(AW - PHASE_W){1'b0}}};

  logic signed [IW-1:0] xs [0:STAGES];
  logic signed [IW-1:0] ys [0:STAGES];
  logic signed [AW-1:0] zs [0:STAGES];
  logic                 fl [0:STAGES];
  logic                 vs [0:STAGES];

  always_ff @(posedge clk) begin
    if (rst) begin
      vs[0] <= 1'b0;
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
      fl[0] <= 1'b0;
    end else begin
      vs[0] <= valid_i;
      xs[0] <= X0;
      ys[0] <= '0;
      // top two bits 01 or 10: angle in the left half plane, rotate by a half turn
      fl[0] <= ang_full[AW-1] ^ ang_full[AW-2];
      zs[0] <= (ang_full[AW-1] ^ ang_full[AW-2]) ? $signed(ang_full + 32'h8000_0000)
                                                 : $signed(ang_full);
    end
  end

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    always_ff @(posedge clk) begin
      if (rst) begin
        vs[i+1] <= 1'b0;
        xs[i+1] <= '0;
        ys[i+1] <= '0;
        zs[i+1] <= '0;
        fl[i+1] <= 1'b0;
      end else begin
        vs[i+1] <= vs[i];
        fl[i+1] <= fl[i];
        if (zs[i] >= 0) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - $signed(atan_tab(i));
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + $signed(atan_tab(i));
        end
      end
    end
  end

  // Unfold and saturate
  function automatic logic signed [OUT_W-1:0] clip(input logic signed [IW-1:0] v);
    localparam logic signed [IW-1:0] MX = IW'((1 << (OUT_W - 1)) - 1);
    logic signed [IW-1:0] r;
    r = (v + IW'(1 << (GB - 1))) >>> GB;   // round off the guard bits
    if (r > MX)       return MX[OUT_W-1:0];
    else if (r < -MX) return -MX[OUT_W-1:0];
    else              return r[OUT_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_o <= 1'b0;
      cos_o   <= '0;
      sin_o   <= '0;
    end else begin
      valid_o <= vs[STAGES];
      cos_o   <= fl[STAGES] ? clip(-xs[STAGES]) : clip(xs[STAGES]);
      sin_o   <= fl[STAGES] ? clip(-ys[STAGES]) : clip(ys[STAGES]);
    end
  end
endmodule
