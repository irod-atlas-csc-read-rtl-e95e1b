// tb_clk_setup_pld: reset selects, writes to each register over the 4-bit
// bus land in the right select field, read back, and address 7 is inert.
`timescale 1ns/1ps
module tb_clk_setup_pld;
  import irod_pkg::*;
  logic clk = 0, rst_n = 0, bdg_wr = 0;
  logic [2:0] bdg_addr = 0;
  logic [3:0] bdg_wdata = 0, bdg_rdata;
  clk_sel_t sel;
  always #5 clk = ~clk;
  clk_setup_pld dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [3:0] m [8];
  localparam logic [3:0] MASK [8] = '{4'h7, 4'h3, 4'h7, 4'h3, 4'h3, 4'h3, 4'h1, 4'h0};
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // reset: RCLK<-BP_RCLK, SCLK<-TCLK, TCLK<-BP_TCLK, D/DC/DX<-synth, HPU<-osc
    m = '{4'd0, 4'd1, 4'd0, 4'd3, 4'd3, 4'd3, 4'd0, 4'd0};
    check(sel.rclk == 0 && sel.sclk == 1 && sel.tclk == 0 && sel.dclk == 3 &&
          sel.dc_clk == 3 && sel.dx_clk == 3 && sel.hpu_clk == 0, "reset selects");
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); bdg_wr = 1; bdg_addr = 3'($urandom); bdg_wdata = 4'($urandom);
      @(posedge clk); m[bdg_addr] = bdg_wdata & MASK[bdg_addr]; #1 bdg_wr = 0;
      check(sel.rclk == m[0][2:0] && sel.sclk == m[1][1:0] && sel.tclk == m[2][2:0] &&
            sel.dclk == m[3][1:0] && sel.dc_clk == m[4][1:0] && sel.dx_clk == m[5][1:0] &&
            sel.hpu_clk == m[6][0], "select fields");
      for (int a = 0; a < 8; a++) begin
        bdg_addr = 3'(a); #1;
        check(bdg_rdata == m[a], $sformatf("read back %0d", a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
