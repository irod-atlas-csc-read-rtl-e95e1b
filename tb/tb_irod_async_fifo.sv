// tb_irod_async_fifo: two unrelated clocks, random writes and reads; every
// word must come out once, in order. Checks that full is reached and that
// a full FIFO holds exactly 2**AW words.
`timescale 1ns/1ps
module tb_irod_async_fifo;
  localparam int AW = 4;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0, wr_en = 0, rd_en = 0, full, empty;
  logic [31:0] wdata = 0, rdata;
  always #5 wclk = ~wclk;
  always #7.3 rclk = ~rclk;
  irod_async_fifo #(.WIDTH(32), .AW(AW)) dut (.*);
  int checks = 0, failures = 0;
  logic [31:0] q [$];
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  int nw = 0, nr = 0, saw_full = 0;
  bit wr_phase = 1;
  initial begin
    repeat (3) @(negedge wclk); wrst_n = 1; rrst_n = 1;
    // fill without reading: must hold exactly 2**AW
    while (!full) begin @(negedge wclk); wr_en = 1; wdata = nw; @(posedge wclk); q.push_back(wdata); nw++; #1 wr_en = 0; end
    check(nw == 2**AW, $sformatf("full after %0d words", nw));
    fork
      begin
        while (nw < 3000) begin
          @(negedge wclk);
          wr_en = !full && ($urandom_range(0, 99) < (nw % 600 < 300 ? 80 : 20));
          wdata = $urandom;
          saw_full += full;
          @(posedge wclk);
          if (wr_en) begin q.push_back(wdata); nw++; end
          #1 wr_en = 0;
        end
      end
      begin
        while (nr < 3000) begin
          @(negedge rclk);
          rd_en = !empty && ($urandom_range(0, 99) < 50);
          if (rd_en) begin
            check(q.size() > 0 && rdata == q[0], $sformatf("word %0d", nr));
          end
          @(posedge rclk);
          if (rd_en) begin void'(q.pop_front()); nr++; end
          #1 rd_en = 0;
        end
      end
    join
    repeat (5) @(posedge rclk);
    check(empty && q.size() == 0, "empty at end");
    check(saw_full > 0, "full seen under traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #5ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
