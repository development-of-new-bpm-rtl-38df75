// tb_adc_capture: behavioural SRAM with a 2-clock read latency; a capture of
// 2^AW words must store exactly the samples following the trigger, in order,
// one per valid sample, and set done; reads issued during the capture must
// wait and all reads must return the stored words.
module tb_adc_capture;
  import bpm_pkg::*;
  localparam int AW = 6;
  logic clk = 0, rst = 1, arm = 0, trig = 0, vi = 0, rq = 0, rv, busy, done, we, re, mrv;
  logic [AW-1:0] ra, ma;
  logic [63:0] d, rd, wd, mrd;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  adc_capture #(.AW(AW)) dut (
    .clk, .rst, .arm, .trigger(trig), .valid_i(vi), .data_i(d), .rd_req(rq), .rd_addr(ra),
    .rd_valid(rv), .rd_data(rd), .busy, .done, .mem_we(we), .mem_re(re), .mem_addr(ma),
    .mem_wdata(wd), .mem_rvalid(mrv), .mem_rdata(mrd)
  );

  // memory model
  logic [63:0] mem [2**AW];
  logic        p1v;
  logic [63:0] p1d;
  always @(posedge clk) begin
    if (!rst && we) mem[ma] <= wd;
    if (!rst && we && re) begin failures++; $display("FAIL read and write together"); end
    p1v <= re; p1d <= mem[ma];
    mrv <= p1v; mrd <= p1d;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] expd [$];
  initial begin
    int n, seqv;
    d = '0; ra = '0;
    for (int k = 0; k < 2**AW; k++) mem[k] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // samples stream all the time
    fork
      forever begin
        @(negedge clk);
        vi = ($urandom_range(0, 2) != 0);
        seqv++;
        d = {16'(seqv), 16'(seqv * 3), 16'(~seqv), 16'(seqv + 7)};
        if (busy && vi) expd.push_back(d);
      end
    join_none
    @(negedge clk) trig = 1;           // ignored: not armed
    @(negedge clk) trig = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL trigger without arm"); end
    arm = 1; @(negedge clk) arm = 0;
    repeat (4) @(negedge clk);
    trig = 1; @(negedge clk) trig = 0;
    repeat (10) @(negedge clk);
    rq = 1; ra = 6'd5; @(negedge clk) rq = 0;   // during the capture
    n = 0;
    while (!done && n < 1000) begin @(negedge clk); n++; end
    checks++;
    if (!done) begin failures++; $display("FAIL no done"); end
    // pending read returns word 5
    repeat (6) @(negedge clk);
    checks++;
    if (expd.size() != 2**AW) begin failures++; $display("FAIL %0d words captured", expd.size()); end
    if (rd != expd[5]) begin failures++; $display("FAIL pending read %h exp %h", rd, expd[5]); end
    for (int k = 0; k < 2**AW; k++) begin
      rq = 1; ra = AW'(k);
      @(negedge clk) rq = 0;
      n = 0;
      while (!rv && n < 10) begin @(negedge clk); n++; end
      checks++;
      if (!rv || rd != expd[k]) begin failures++; $display("FAIL word %0d: %h exp %h", k, rd, expd[k]); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
