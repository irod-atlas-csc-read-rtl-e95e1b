// tb_vme_dpram: writes from each port read back from the other, one-clock
// read latency, and random traffic on both ports against a memory model
// (ports kept on different addresses when writing).
`timescale 1ns/1ps
module tb_vme_dpram;
  logic clk_v = 0, clk_h = 0, we_v = 0, we_h = 0;
  logic [13:0] addr_v = 0, addr_h = 0;
  logic [31:0] wdata_v = 0, wdata_h = 0, rdata_v, rdata_h;
  always #10 clk_v = ~clk_v;
  always #7 clk_h = ~clk_h;
  vme_dpram dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [31:0] model [int];
  initial begin
    // host writes, VME reads
    for (int i = 0; i < 64; i++) begin
      @(negedge clk_h); we_h = 1; addr_h = 14'(i * 257); wdata_h = $urandom; model[i * 257 % 16384] = wdata_h;
      @(posedge clk_h); #1 we_h = 0;
    end
    for (int i = 0; i < 64; i++) begin
      @(negedge clk_v); addr_v = 14'(i * 257);
      @(posedge clk_v); #1;
      check(rdata_v == model[i * 257 % 16384], $sformatf("VME reads host word %0d", i));
    end
    // VME writes, host reads, including top address
    for (int i = 0; i < 64; i++) begin
      @(negedge clk_v); we_v = 1; addr_v = 14'(16383 - i); wdata_v = $urandom; model[16383 - i] = wdata_v;
      @(posedge clk_v); #1 we_v = 0;
    end
    for (int i = 0; i < 64; i++) begin
      @(negedge clk_h); addr_h = 14'(16383 - i);
      @(posedge clk_h); #1;
      check(rdata_h == model[16383 - i], $sformatf("host reads VME word %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
