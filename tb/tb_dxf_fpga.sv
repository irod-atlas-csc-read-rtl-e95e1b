// tb_dxf_fpga: one DXF FPGA (half A) from host instruction stream to DX
// internal bus. Checks that instructions for half B alone (and their
// payloads) are ignored, that a front sequence from two DPUs and written
// data reach the bus in order with C and F, that the control register stops
// and restarts the front end, that the back counter verify/capture results
// show in the status and capture registers, and the notify pulses.
`timescale 1ns/1ps
module tb_dxf_fpga;
  import irod_pkg::*;
  import tb_dx_pkg::*;
  logic clk_dx = 0, clk_int = 0, rst_n = 0;
  always #12.5 clk_dx = ~clk_dx;
  always #8 clk_int = ~clk_int;
  logic instr_valid = 0, instr_ready, reg_wr = 0;
  logic [31:0] instr_data = 0, reg_wdata = 0, reg_rdata;
  logic [1:0] reg_addr = 0;
  logic notify_front, notify_back;
  logic [5:0] src_req, dst_wr;
  logic rvalid, rlast, wready, eoe, sch, dch;
  logic [31:0] rdata, wdata;
  logic bus_grant = 1, bus_ready = 1, bus_release, front_stall, back_stall;
  dx_bus_t bus_out;
  logic throttle = 1;
  dxf_fpga #(.HALF_B(1'b0), .IF_AW(4), .DF_AW(3)) dut (
    .clk_dx, .clk_int, .rst_n, .instr_valid, .instr_data, .instr_ready,
    .reg_wr, .reg_addr, .reg_wdata, .reg_rdata, .notify_front, .notify_back,
    .dxd_src_req(src_req), .dxd_rvalid(rvalid), .dxd_rlast(rlast), .dxd_rdata(rdata),
    .dxd_dst_wr(dst_wr), .dxd_wdata(wdata), .dxd_wready(wready), .dxd_eoe(eoe),
    .dxd_sch(sch), .dxd_dch(dch), .bus_grant, .bus_ready, .bus_out, .bus_release,
    .front_stall, .back_stall);
  int len [6] = '{5, 3, 1, 1, 1, 1};
  int rxc [6];
  longint rxs [6];
  int eoec;
  dxd_model #(.HALF(0)) u_m (.clk(clk_dx), .rst_n, .throttle, .len, .src_req, .rvalid, .rlast,
    .rdata, .dst_wr, .wdata, .wready, .rx_count(rxc), .rx_sum(rxs), .eoe_count(eoec), .eoe);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic push(logic [31:0] w);
    @(negedge clk_dx); instr_valid = 1; instr_data = w; #1;
    while (!instr_ready) begin @(negedge clk_dx); #1; end
    @(posedge clk_dx); #1 instr_valid = 0;
  endtask
  task automatic wr_reg(logic [1:0] a, logic [31:0] d);
    @(negedge clk_dx); reg_wr = 1; reg_addr = a; reg_wdata = d; @(posedge clk_dx); #1 reg_wr = 0;
  endtask
  task automatic rd_reg(logic [1:0] a, output logic [31:0] d);
    @(negedge clk_dx); reg_addr = a; #1 d = reg_rdata;
  endtask

  dx_bus_t exp [$];
  int got = 0, n_nf = 0, n_nb = 0, n_rel = 0;
  always @(negedge clk_int) bus_ready = $urandom_range(0, 1);
  // a word moves at the rising edge where valid (which includes ready) is high
  always @(posedge clk_int) if (rst_n) begin
    if (bus_out.valid) begin
      check(exp.size() > 0 && bus_out == exp[0], $sformatf("bus word %0d %h", got, bus_out.data));
      if (exp.size()) void'(exp.pop_front());
      got++;
    end
    n_nb += notify_back; n_rel += bus_release;
  end
  always @(negedge clk_dx) if (rst_n) n_nf += notify_front;

  logic [31:0] v;
  initial begin
    repeat (3) @(negedge clk_dx); rst_n = 1;
    rd_reg(2'd0, v); check(v[1:0] == 2'b11, "control resets to enabled");
    // for B only: must be ignored, payload includes a word that looks like an A run
    push(i_wdata(tag_data(1, 1, 1), 2'b01, 0, 1, 6'h0, 8'd2));
    push(i_run(tag_data(1, 1, 1), 2'b10, 0, 0, 0, 1, 6'h0, 6'h3)); push(32'h0);
    // stop the front end, queue work, check nothing moves
    wr_reg(2'd0, 32'h2);
    push(i_run(tag_data(0, 1, 1), 2'b11, 1, 0, 1, 1, 6'h0, 6'b000011));
    for (int i = 0; i < 5; i++) exp.push_back('{1'b1, 1'b0, 1'b1, 1'b1, dpu_word(0, 0, 0, i)});
    for (int i = 0; i < 3; i++) exp.push_back('{1'b1, 1'b0, 1'b1, 1'b1, dpu_word(0, 1, 0, i)});
    push(i_wdata(tag_data(1, 1, 0), 2'b10, 0, 1, 6'h0, 8'd1)); push(32'hFACE);
    exp.push_back('{1'b1, 1'b1, 1'b1, 1'b0, 32'hFACE});
    push(i_wcmd(2'b10, 8'd4));
    push(c_word(4'b0111, 16'd9)); push(c_word(4'b0110, 0)); push(c_word(4'b0111, 16'd7));
    push(c_word(4'b0100, 0));
    push(i_simple(4'b0110, 2'b11, 0)); push(i_simple(4'b0100, 2'b10, 0));
    repeat (20) @(negedge clk_dx);
    rd_reg(2'd1, v);
    check(got == 0 && v[2] == 1'b0 && v[5] == 1'b0, "front end stopped by control register");
    wr_reg(2'd0, 32'h3);
    repeat (200) @(negedge clk_dx);
    check(exp.size() == 0 && got == 9, $sformatf("bus words %0d", got));
    rd_reg(2'd1, v);
    check(v[0] == 1'b0 && v[1] == 1'b1 && v[2] == 1'b1, $sformatf("status %h: back verify error only", v));
    rd_reg(2'd2, v); check(v == 9, $sformatf("front captured %0d", v));
    rd_reg(2'd3, v); check(v == 9, $sformatf("back captured %0d", v));
    check(n_nf == 1 && n_nb == 1 && n_rel == 0, "notify pulses");
    check(eoec == 1 && rxc[0] == 0, "end of event on the DXD bus, no DPU written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
