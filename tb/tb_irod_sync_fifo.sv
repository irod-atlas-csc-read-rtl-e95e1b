// tb_irod_sync_fifo: random pushes and pops against a queue model; checks
// order, full at 2**AW entries, empty, and simultaneous push/pop when full.
`timescale 1ns/1ps
module tb_irod_sync_fifo;
  localparam int AW = 4;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, full, empty;
  logic [31:0] wdata = 0, rdata;
  logic [AW:0] count;
  always #5 clk = ~clk;
  irod_sync_fifo #(.WIDTH(32), .AW(AW)) dut (.*);
  int checks = 0, failures = 0;
  logic [31:0] q [$];
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  int saw_full = 0;
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    check(empty && !full && count == 0, "empty after reset");
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // phase-dependent bias: fill, then drain
      rd_en = !empty && ($urandom_range(0, 99) < ((n / 200) % 2 ? 70 : 30));
      wr_en = ($urandom_range(0, 99) < ((n / 200) % 2 ? 30 : 70)) && (!full || rd_en);
      wdata = $urandom;
      check(count == q.size(), "count matches model");
      check(full == (q.size() == 2**AW), "full flag");
      check(empty == (q.size() == 0), "empty flag");
      if (rd_en) check(rdata == q[0], "head word");
      saw_full += full;
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wdata);
      #1 rd_en = 0; wr_en = 0;
    end
    // fill completely
    while (!full) begin @(negedge clk); wr_en = 1; wdata = $urandom; @(posedge clk); q.push_back(wdata); #1 wr_en = 0; end
    check(q.size() == 2**AW, "full at depth");
    // push and pop together while full
    @(negedge clk); wr_en = 1; rd_en = 1; wdata = 32'h1234_5678;
    check(rdata == q[0], "head when full");
    @(posedge clk); void'(q.pop_front()); q.push_back(wdata); #1 wr_en = 0; rd_en = 0;
    check(full, "still full after push+pop");
    while (!empty) begin @(negedge clk); check(rdata == q[0], "drain order"); rd_en = 1; @(posedge clk); void'(q.pop_front()); #1 rd_en = 0; end
    check(q.size() == 0 && saw_full > 0, "drained, full was reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
