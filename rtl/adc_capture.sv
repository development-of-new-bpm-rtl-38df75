// adc_capture: raw ADC data recording into the external QDR II SRAM.
//
// After `arm`, a `trigger` starts a single-shot capture: each valid ADC
// sample word (all four channels, 4 x 16 bits) is written to consecutive
// memory addresses at the sampling rate until 2^AW words (512k samples per
// ADC by default, the depth given in the design description) are stored;
// `done` is then set until the next arm. Between captures the control system
// reads the memory back word by word: rd_req with rd_addr issues a read, and
// rd_valid/rd_data return the memory's answer. A read requested during a
// capture waits until the capture has ended. Arm/trigger sequencing and the
// read path are this design's choices.
// Memory port: single request per clock (mem_we or mem_re) with mem_addr; read
// data returns later with mem_rvalid.
module adc_capture
  import bpm_pkg::*;
#(
  parameter int AW = 19,
  parameter int DW = N_CH * ADC_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          arm,
  input  logic          trigger,
  input  logic          valid_i,
  input  logic [DW-1:0] data_i,
  input  logic          rd_req,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_valid,
  output logic [DW-1:0] rd_data,
  output logic          busy,
  output logic          done,
  output logic          mem_we,
  output logic          mem_re,
  output logic [AW-1:0] mem_addr,
  output logic [DW-1:0] mem_wdata,
  input  logic          mem_rvalid,
  input  logic [DW-1:0] mem_rdata
);
  typedef enum logic [1:0] {IDLE, ARMED, CAPT} state_t;
  state_t        state;
  logic [AW-1:0] wa;
  logic          rd_pend;
  logic [AW-1:0] rd_a;

  assign busy = (state == CAPT);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      wa        <= '0;
      done      <= 1'b0;
      rd_pend   <= 1'b0;
      rd_a      <= '0;
      mem_we    <= 1'b0;
      mem_re    <= 1'b0;
      mem_addr  <= '0;
      mem_wdata <= '0;
      rd_valid  <= 1'b0;
      rd_data   <= '0;
    end else begin
      mem_we   <= 1'b0;
      mem_re   <= 1'b0;
      rd_valid <= mem_rvalid;
      if (mem_rvalid) rd_data <= mem_rdata;
      if (rd_req) begin
        rd_pend <= 1'b1;
        rd_a    <= rd_addr;
      end

      unique case (state)
        IDLE: if (arm) begin
          state <= ARMED;
          done  <= 1'b0;
        end
        ARMED: if (trigger) begin
          state <= CAPT;
          wa    <= '0;
        end
        CAPT: if (valid_i) begin
          mem_we    <= 1'b1;
          mem_addr  <= wa;
          mem_wdata <= data_i;
          wa        <= wa + 1'b1;
          if (wa == '1) begin
            state <= IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase

      if (state != CAPT && rd_pend && !rd_req) begin
        mem_re   <= 1'b1;
        mem_addr <= rd_a;
        rd_pend  <= 1'b0;
      end
    end
  end
endmodule
