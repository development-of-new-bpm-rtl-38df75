// tb_pos_recorder: behavioural DDR2 port that stalls at random; every record
// accepted must land at consecutive ring-buffer addresses, in order, with the
// right sequence number; a long stall must overflow the FIFO and the dropped
// count must match the records that never arrived.
module tb_pos_recorder;
  localparam int AW = 5;
  logic clk = 0, rst = 1, en = 0, vi = 0, we, rdy = 1;
  logic [31:0] x, y, q, dropped;
  logic [AW-1:0] addr, wp;
  logic [127:0] wd;
  int checks = 0, failures = 0, stalls = 0;
  always #5 clk = ~clk;

  pos_recorder #(.AW(AW), .FIFO_LOG2(3)) dut (
    .clk, .rst, .enable(en), .valid_i(vi), .x_f(x), .y_f(y), .charge(q),
    .mem_we(we), .mem_addr(addr), .mem_wdata(wd), .mem_ready(rdy), .wr_ptr(wp), .dropped
  );

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] sent [$];   // records offered while enabled, with their sequence numbers
  int  seqn = 0, nwr = 0;
  int  lost = 0;
  always @(posedge clk) begin
    if (!rst && we && !rdy) stalls++;
    if (!rst && we && rdy) begin
      logic [127:0] e;
      checks += 2;
      // skip records the FIFO dropped: their sequence numbers are missing
      while (sent.size() > 0 && sent[0][127:96] != wd[127:96]) begin
        void'(sent.pop_front());
        lost++;
      end
      e = sent.pop_front();
      if (wd != e) begin failures++; $display("FAIL record %h exp %h", wd, e); end
      if (addr != AW'(nwr)) begin failures++; $display("FAIL addr %0d exp %0d", addr, AW'(nwr)); end
      nwr++;
    end
  end

  initial begin
    x = '0; y = '0; q = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en  = (n > 20 && n < 2900);
      vi  = ($urandom_range(0, 3) == 0);
      rdy = (n > 1000 && n < 1300) ? 1'b0 : ($urandom_range(0, 2) != 0);
      x = $urandom; y = $urandom; q = $urandom;
      if (en && vi) begin
        sent.push_back({32'(seqn), q, y, x});
        seqn++;
      end
    end
    rdy = 1;
    repeat (40) @(negedge clk);
    checks += 3;
    lost += sent.size();
    if (dropped == 0) begin failures++; $display("FAIL no overflow"); end
    if (int'(dropped) != lost) begin failures++; $display("FAIL dropped %0d lost %0d", dropped, lost); end
    if (wp != AW'(nwr)) begin failures++; $display("FAIL wr_ptr %0d exp %0d", wp, AW'(nwr)); end
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
