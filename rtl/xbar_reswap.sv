// xbar_reswap: control of the RFFE crossbar switch and re-swapping of the
// button amplitudes.
//
// The RFFE crossbar exchanges the signals of opposite buttons (A<->C, B<->D)
// so that the drift and non-linearity of each analog channel is shared by
// both buttons of a pair; the firmware swaps the data back. Here, while
// `enable` is set, xbar_swap toggles every `period` amplitude samples; after
// each toggle the next `blank` samples are dropped, since the filters still
// hold data from before the switch, and from then on the amplitudes are
// exchanged back according to the new state. With enable low the switch
// returns to (and stays in) its straight position, again with blanking, and
// samples pass unchanged. The crossbar and the
// re-swap follow the design description; the period, the blanking and doing
// the re-swap on amplitudes are this design's choices.
// Timing: one register stage; xbar_swap changes on the clock after the
// period-th sample (or, on disable, after the next sample).
module xbar_reswap
  import bpm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [15:0] period,
  input  logic [7:0]  blank,
  input  logic        valid_i,
  input  amp_t        amp_i [N_CH],
  output logic        valid_o,
  output amp_t        amp_o [N_CH],
  output logic        xbar_swap,
  output logic        switched       // pulses with every toggle of xbar_swap
);
  logic [15:0] cnt;
  logic [7:0]  bcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      bcnt      <= '0;
      xbar_swap <= 1'b0;
      switched  <= 1'b0;
      valid_o   <= 1'b0;
      for (int c = 0; c < N_CH; c++) amp_o[c] <= '0;
    end else begin
      valid_o  <= 1'b0;
      switched <= 1'b0;
      if (valid_i) begin
        if (bcnt != '0) begin
          bcnt <= bcnt - 8'd1;
        end else begin
          valid_o <= 1'b1;
          for (int c = 0; c < N_CH; c++)
            amp_o[c] <= xbar_swap ? amp_i[(c + 2) % N_CH] : amp_i[c];
        end
        if (!enable) begin
          cnt <= '0;
          if (xbar_swap) begin           // back to straight: also a switch
            xbar_swap <= 1'b0;
            switched  <= 1'b1;
            bcnt      <= blank;
          end
        end else begin
          if (cnt + 16'd1 >= period) begin
            cnt       <= '0;
            xbar_swap <= ~xbar_swap;
            switched  <= 1'b1;
            bcnt      <= blank;
          end else begin
            cnt <= cnt + 16'd1;
          end
        end
      end
    end
  end
endmodule
