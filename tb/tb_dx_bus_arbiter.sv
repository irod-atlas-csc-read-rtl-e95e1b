// tb_dx_bus_arbiter: ownership starts with A, moves only on a release by
// the owner, and the bus carries the owner's word.
`timescale 1ns/1ps
module tb_dx_bus_arbiter;
  import irod_pkg::*;
  logic clk = 0, rst_n = 0, release_a = 0, release_b = 0, grant_a, grant_b, handover;
  dx_bus_t bus_a, bus_b, bus_out;
  always #5 clk = ~clk;
  dx_bus_arbiter dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  bit owner_b_model = 0;
  initial begin
    bus_a = '0; bus_b = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      release_a = $urandom_range(0, 3) == 0;
      release_b = $urandom_range(0, 3) == 0;
      bus_a = '{valid: !owner_b_model, ctrl: 1'b0, rol_en: 1'b1, host_en: 1'b0, data: $urandom};
      bus_b = '{valid: owner_b_model,  ctrl: 1'b1, rol_en: 1'b0, host_en: 1'b1, data: $urandom};
      #1;
      check(grant_a == !owner_b_model && grant_b == owner_b_model, "grant");
      check(bus_out == (owner_b_model ? bus_b : bus_a), "bus carries owner's word");
      check(handover == ((owner_b_model && release_b) || (!owner_b_model && release_a)), "handover");
      @(posedge clk);
      if ((owner_b_model && release_b) || (!owner_b_model && release_a)) owner_b_model = !owner_b_model;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
