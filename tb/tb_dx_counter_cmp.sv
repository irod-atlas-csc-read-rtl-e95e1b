// tb_dx_counter_cmp: counts, verify against the 16 LSBs (match and
// mismatch, wrap past 16 bits), capture, and reset clearing the error.
`timescale 1ns/1ps
module tb_dx_counter_cmp;
  logic clk = 0, rst_n = 0, inc = 0, clr = 0, cap = 0, ver = 0, mismatch, err;
  logic [15:0] v = 0;
  logic [31:0] count, captured;
  always #5 clk = ~clk;
  dx_counter_cmp #(.CW(32)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(posedge clk); #1 s = 0;
  endtask
  int n;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    n = 70000 + $urandom_range(0, 100);
    @(negedge clk); inc = 1;
    repeat (n) @(posedge clk);
    #1 inc = 0;
    check(count == n, $sformatf("count %0d expected %0d", count, n));
    @(negedge clk); v = 16'(n); ver = 1; #1 check(!mismatch, "verify LSBs match");
    @(posedge clk); #1 ver = 0; check(!err, "no error on match");
    @(negedge clk); v = 16'(n + 1); ver = 1; #1 check(mismatch, "mismatch detected");
    @(posedge clk); #1 ver = 0; check(err, "error sticky");
    pulse(cap); check(captured == n, "captured");
    pulse(inc); check(count == n + 1 && captured == n, "capture holds");
    pulse(clr); check(count == 0 && !err, "reset clears count and error");
    @(negedge clk); inc = 1; clr = 1; @(posedge clk); #1 inc = 0; clr = 0;
    check(count == 0, "clear wins over increment");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #5ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
