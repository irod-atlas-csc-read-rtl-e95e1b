// tb_clk_mux: every select of a 5-input mux passes its input; selects past
// the last input give a low output.
`timescale 1ns/1ps
module tb_clk_mux;
  logic [4:0] clk_in;
  logic [2:0] sel;
  logic clk_out;
  clk_mux #(.N(5)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    for (int i = 0; i < 400; i++) begin
      clk_in = 5'($urandom); sel = 3'($urandom);
      #1;
      check(clk_out == (sel < 5 ? clk_in[sel] : 1'b0), $sformatf("sel %0d in %b out %b", sel, clk_in, clk_out));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
