// tb_dxb_fpga: bus words with and without the ROL enable, random link
// back-pressure; the DG output must carry exactly the ROL words with their
// control bit, in order, and the sent-word count must match.
`timescale 1ns/1ps
module tb_dxb_fpga;
  import irod_pkg::*;
  logic clk_int = 0, clk_d = 0, rst_n = 0, full, dg_valid, dg_ready = 0;
  dx_bus_t bus_in;
  logic [32:0] dg_data;
  logic [31:0] dg_words;
  always #8 clk_int = ~clk_int;
  always #12.5 clk_d = ~clk_d;
  dxb_fpga #(.AW(3)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [32:0] expq [$];
  int got = 0, saw_full = 0;
  always @(posedge clk_d) begin
    if (rst_n && dg_valid && dg_ready) begin
      check(expq.size() > 0 && dg_data == expq[0], $sformatf("DG word %0d", got));
      if (expq.size()) void'(expq.pop_front());
      got++;
    end
    dg_ready <= $urandom_range(0, 2) == 0;
  end
  initial begin
    bus_in = '0;
    repeat (3) @(negedge clk_int); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk_int);
      saw_full += full;
      bus_in = '{valid: !full && $urandom_range(0, 1), ctrl: 1'($urandom), rol_en: $urandom_range(0, 3) != 0,
                 host_en: 1'($urandom), data: $urandom};
      if (bus_in.valid && bus_in.rol_en) expq.push_back({bus_in.ctrl, bus_in.data});
    end
    @(negedge clk_int); bus_in = '0;
    wait (expq.size() == 0);
    repeat (4) @(posedge clk_d);
    check(dg_words == got && got > 100, $sformatf("sent count %0d / %0d", dg_words, got));
    check(saw_full > 0, "FIFO filled under back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
