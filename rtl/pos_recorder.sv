// pos_recorder: position and charge history in the external DDR2 SDRAM.
//
// While `enable` is set, every position result becomes one 128-bit record
// {sequence number, charge, Y, X} that is queued in a FIFO of 2^FIFO_LOG2
// entries and written to consecutive addresses of a ring buffer of 2^AW
// records; how long a history fits thus depends on the update rate, as in the
// design description. The memory may stall (mem_ready low); when the FIFO is
// full a record is dropped and counted in `dropped`. wr_ptr is the next
// address to be written. Record layout, ring-buffer addressing and the FIFO
// are this design's choices.
// Memory port: valid/ready; mem_we with mem_addr/mem_wdata is held until
// mem_ready is seen high in the same clock.
module pos_recorder #(
  parameter int AW        = 24,
  parameter int FIFO_LOG2 = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          enable,
  input  logic          valid_i,
  input  logic [31:0]   x_f,
  input  logic [31:0]   y_f,
  input  logic [31:0]   charge,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [127:0]  mem_wdata,
  input  logic          mem_ready,
  output logic [AW-1:0] wr_ptr,
  output logic [31:0]   dropped
);
  localparam int DEPTH = 2 ** FIFO_LOG2;

  logic [127:0]       fifo [DEPTH];
  logic [FIFO_LOG2:0] rp, wp;
  logic [31:0]        seq;
  logic               full, empty, push, pop;

  assign full  = (wp - rp) == (FIFO_LOG2+1)'(DEPTH);
  assign empty = (wp == rp);
  assign push  = enable && valid_i && !full;
  assign pop   = mem_we && mem_ready;

  assign mem_we    = !empty && !rst;   // quiet while reset clears the pointers
  assign mem_wdata = fifo[rp[FIFO_LOG2-1:0]];
  assign mem_addr  = wr_ptr;

  always_ff @(posedge clk) begin
    if (push) fifo[wp[FIFO_LOG2-1:0]] <= {seq, charge, y_f, x_f};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rp      <= '0;
      wp      <= '0;
      seq     <= '0;
      wr_ptr  <= '0;
      dropped <= '0;
    end else begin
      if (valid_i && enable) seq <= seq + 32'd1;
      if (push) wp <= wp + 1'b1;
      if (enable && valid_i && full) dropped <= dropped + 32'd1;
      if (pop) begin
        rp     <= rp + 1'b1;
        wr_ptr <= wr_ptr + 1'b1;
      end
    end
  end

  // valid/ready rule: a request stays up, unchanged, until accepted
  a_hold: assert property (@(posedge clk) disable iff (rst)
                           mem_we && !mem_ready |=> mem_we && $stable(mem_wdata) && $stable(mem_addr));
endmodule
