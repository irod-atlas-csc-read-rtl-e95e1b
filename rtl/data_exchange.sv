// data_exchange: the Data Exchange (DX) subsystem of the ROD.
//
// The DX builds events. Its front end is two DXF FPGAs (halves A and B),
// each on the DXD bus of six DPUs; both receive the same DX instruction
// stream from the host DSP and each keeps what is addressed to it. Their
// tag+data FIFOs feed one shared DX internal bus (32 data bits, a 33rd
// control bit, and the two destination FIFO enables). Only the owner of the
// bus may drive it; ownership passes between the halves through the "release
// output bus" DX command (dx_bus_arbiter). The back end takes each bus word
// into the Host FIFO (captured-data readback path to the host, 16K x 32)
// and/or the DXB FPGA's FIFO, which sends it to the backplane (P0, DG lines).
// A bus word is only placed when both back-end FIFOs have room.
// Clocks: DX_CLK (front end), DXINT_CLK (DX internal bus), DCLK (DG output)
// and the host clock (Host FIFO read side), as in the design's DX diagram.
// Register accesses select half A or B with reg_sel_b.
module data_exchange
  import irod_pkg::*;
#(
  parameter int unsigned HF_AW  = 14,     // Host FIFO: 16K x 32
  parameter int unsigned IF_AW  = 9,
  parameter int unsigned DF_AW  = 9,
  parameter int unsigned DXB_AW = 10
) (
  input  logic              clk_dx,
  input  logic              clk_int,
  input  logic              clk_d,
  input  logic              clk_host,
  input  logic              rst_n,
  // host instruction stream (BDH), seen by both halves
  input  logic              instr_valid,
  input  logic [31:0]       instr_data,
  output logic              instr_ready,
  // host registers
  input  logic              reg_sel_b,
  input  logic              reg_wr,
  input  logic [1:0]        reg_addr,
  input  logic [31:0]       reg_wdata,
  output logic [31:0]       reg_rdata,
  output logic [1:0]        notify_front, // [0] A, [1] B  (DX_CLK)
  output logic [1:0]        notify_back,  // [0] A, [1] B  (DXINT_CLK)
  // DXD buses, index 0 = DXD_A, 1 = DXD_B
  output logic [1:0][NUM_DPU-1:0] dxd_src_req,
  input  logic [1:0]        dxd_rvalid,
  input  logic [1:0]        dxd_rlast,
  input  logic [1:0][31:0]  dxd_rdata,
  output logic [1:0][NUM_DPU-1:0] dxd_dst_wr,
  output logic [1:0][31:0]  dxd_wdata,
  input  logic [1:0]        dxd_wready,
  output logic [1:0]        dxd_eoe,
  output logic [1:0]        dxd_sch,
  output logic [1:0]        dxd_dch,
  // Host FIFO read side (captured data readback, BDF)
  input  logic              hf_rd,
  output logic [31:0]       hf_rdata,
  output logic              hf_empty,
  // DG to backplane P0 (DCLK)
  output logic [32:0]       dg_data,
  output logic              dg_valid,
  input  logic              dg_ready,
  output logic [31:0]       dg_words,
  // monitoring
  output logic              bus_owner_b,
  output logic              bus_handover,
  output logic [1:0]        front_stall,
  output logic [1:0]        back_stall,
  output logic              bus_full_stall
);
  logic [1:0]        rdy;
  logic [1:0][31:0]  rdata;
  logic [1:0]        grant, release_req;
  dx_bus_t           bus_half [2];
  dx_bus_t           bus;
  logic              bus_ready, hf_full, dxb_full;

  for (genvar h = 0; h < 2; h++) begin : g_half
    dxf_fpga #(.HALF_B(h == 1), .IF_AW(IF_AW), .DF_AW(DF_AW)) u_dxf (
      .clk_dx, .clk_int, .rst_n,
      .instr_valid(instr_valid && instr_ready), .instr_data, .instr_ready(rdy[h]),
      .reg_wr(reg_wr && (reg_sel_b == (h == 1))), .reg_addr, .reg_wdata,
      .reg_rdata(rdata[h]),
      .notify_front(notify_front[h]), .notify_back(notify_back[h]),
      .dxd_src_req(dxd_src_req[h]), .dxd_rvalid(dxd_rvalid[h]), .dxd_rlast(dxd_rlast[h]),
      .dxd_rdata(dxd_rdata[h]), .dxd_dst_wr(dxd_dst_wr[h]), .dxd_wdata(dxd_wdata[h]),
      .dxd_wready(dxd_wready[h]), .dxd_eoe(dxd_eoe[h]), .dxd_sch(dxd_sch[h]),
      .dxd_dch(dxd_dch[h]),
      .bus_grant(grant[h]), .bus_ready, .bus_out(bus_half[h]), .bus_release(release_req[h]),
      .front_stall(front_stall[h]), .back_stall(back_stall[h]));
  end

  // both halves take each instruction word in the same cycle
  assign instr_ready = &rdy;
  assign reg_rdata   = reg_sel_b ? rdata[1] : rdata[0];

  dx_bus_arbiter u_arb (
    .clk(clk_int), .rst_n, .release_a(release_req[0]), .release_b(release_req[1]),
    .bus_a(bus_half[0]), .bus_b(bus_half[1]),
    .grant_a(grant[0]), .grant_b(grant[1]), .bus_out(bus), .handover(bus_handover));

  assign bus_owner_b    = grant[1];
  assign bus_ready      = !hf_full && !dxb_full;
  assign bus_full_stall = !bus_ready;

  irod_async_fifo #(.WIDTH(32), .AW(HF_AW)) u_host_fifo (
    .wclk(clk_int), .wrst_n(rst_n), .wr_en(bus.valid && bus.host_en), .wdata(bus.data),
    .full(hf_full),
    .rclk(clk_host), .rrst_n(rst_n), .rd_en(hf_rd), .rdata(hf_rdata), .empty(hf_empty));

  dxb_fpga #(.AW(DXB_AW)) u_dxb (
    .clk_int, .clk_d, .rst_n, .bus_in(bus), .full(dxb_full),
    .dg_data, .dg_valid, .dg_ready, .dg_words);
endmodule
