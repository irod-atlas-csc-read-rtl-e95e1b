// tb_power_pld: power-up sequencing with a short one-shot. Checks that
// nothing is enabled before PED or without MBPWROK, that the DSP supplies
// come on during ONE_O, that the one-shot lasts ONE_SEC_CYCLES clocks, that
// after it a missing VAOK or VCOK turns both DSP supplies off, that PENB
// needs both, and that MBRESET_N follows SYSRESET_N.
`timescale 1ns/1ps
module tb_power_pld;
  localparam int ONE = 100;
  logic clk = 0, por_n = 0, ped_wr = 0, ped_wdata = 0;
  logic mbpwrok = 0, vaok = 0, vbok = 0, vcok = 0, sysreset_n = 1;
  logic pena, penb, penc, mbreset_n, ped, one_o;
  logic [5:0] status;
  always #5 clk = ~clk;
  power_pld #(.ONE_SEC_CYCLES(ONE)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic settle(); repeat (4) @(negedge clk); endtask
  task automatic write_ped(bit v);
    @(negedge clk); ped_wr = 1; ped_wdata = v; @(posedge clk); #1 ped_wr = 0;
  endtask
  int len;
  initial begin
    repeat (2) @(negedge clk); por_n = 1;
    settle();
    check({pena, penb, penc} == 0 && !ped, "all off after power-on");
    mbpwrok = 1; settle();
    check({pena, penb, penc} == 0, "off while PED clear");
    mbpwrok = 0;
    write_ped(1);
    len = 0;
    @(negedge clk);
    while (one_o) begin len++; @(negedge clk); end
    check(len == ONE, $sformatf("one-shot lasted %0d clocks", len));
    check({pena, penb, penc} == 0, "off without MBPWROK");
    // restart the one-shot with MBPWROK present
    write_ped(0); mbpwrok = 1; write_ped(1);
    settle();
    check(one_o && pena && penc && !penb, "DSP supplies on during ONE_O, VB waits");
    vcok = 1; settle();
    check(!penb, "VB waits for VAOK as well");
    vaok = 1; settle();
    check(penb && pena && penc, "all on");
    while (one_o) @(negedge clk);
    settle();
    check(pena && penb && penc, "stays on after the one-shot");
    vcok = 0; settle();
    check(!pena && !penb && penc, "VCC failure drops DSP_VA and VB");
    vaok = 0; settle();
    check(!penc && !pena, "both DSP supplies off once both fail after the one-shot");
    check(status[4] == 1 && status[0] == 1, "status shows PED and MBPWROK");
    sysreset_n = 0; settle();
    check(!mbreset_n, "MBRESET_N follows SYSRESET_N low");
    sysreset_n = 1; settle();
    check(mbreset_n, "MBRESET_N released");
    write_ped(0); settle();
    check(!ped && {pena, penb, penc} == 0, "PED clear turns everything off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
