// irod_top: the logic of the IROD, a DSP-based read-out driver for the
// ATLAS cathode strip chambers.
//
// The board is built around DSP modules: one host module (HPU) and up to
// twelve data processing modules (DPU A0..A5, B0..B5), which in the CSC
// application act as sparsifiers (SPU) and event builders (RPU). The DSPs,
// their memories and the FPGA firmware that only carries generic I/O are
// outside this RTL; their buses are ports. What is here:
//   * data_exchange - the Data Exchange that builds events from the DPUs
//     under a DX instruction stream from the host and sends them to the
//     backplane (P0) and/or back to the host through the Host FIFO;
//   * the VME interface memories - a 16K-word FIFO for block transfers from
//     host to VME and a 16K x 32 dual-port RAM shared by VME and host;
//   * power_pld - sequencing of the power switch enables;
//   * clk_network and clk_setup_pld - selection of the board clocks, set by
//     the host over its 4-bit BDG bus.
// Clock domains: the DX runs on DX_CLK, DXINT_CLK and DCLK from the clock
// network; host-side ports are on HPU_CLK, VME-side ports on VME_CLK, and
// the power PLD on the crystal oscillator (a choice of this design).
// por_n (power-on reset) resets the power PLD and the clock selects; rst_n
// resets the rest of the logic and should be held while clock selects
// change, so that the clock setup survives a logic reset.
// The clock setup register is written over the host bus and so runs on
// HPU_CLK, which it also selects: choosing a synthesizer for HPU_CLK that is
// not running stops the host together with the register, and only por_n
// brings back the oscillator.
module irod_top
  import irod_pkg::*;
(
  // clock sources
  input  logic bp_rclk, fp_rclk, bp_tclk, fp_tclk, osc,
  input  logic s_rclk, s_sclk, s_tclk, s_dclk, s_dc_clk, s_dx_clk,
  input  logic s_hpu_clk, s_dpu_clk, s_dxint_clk, s_vme_clk,
  output logic rclk, sclk, tclk, dclk, dc_clk, hpu_clk, dpu_clk, vme_clk,
  input  logic rst_n,
  // clock setup over BDG (HPU_CLK)
  input  logic       bdg_wr,
  input  logic [2:0] bdg_addr,
  input  logic [3:0] bdg_wdata,
  output logic [3:0] bdg_rdata,
  // DX instruction stream and registers over BDH (DX_CLK)
  input  logic        instr_valid,
  input  logic [31:0] instr_data,
  output logic        instr_ready,
  input  logic        dx_reg_sel_b,
  input  logic        dx_reg_wr,
  input  logic [1:0]  dx_reg_addr,
  input  logic [31:0] dx_reg_wdata,
  output logic [31:0] dx_reg_rdata,
  output logic [1:0]  notify_front,
  output logic [1:0]  notify_back,
  // DXD_A / DXD_B buses to the DPUs (DX_CLK)
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
  // Host FIFO readback over BDF (HPU_CLK)
  input  logic        hf_rd,
  output logic [31:0] hf_rdata,
  output logic        hf_empty,
  // DG to backplane P0 (DCLK)
  output logic [32:0] dg_data,
  output logic        dg_valid,
  input  logic        dg_ready,
  output logic [31:0] dg_words,
  // DX monitoring
  output logic        dx_bus_owner_b,
  output logic        dx_bus_handover,
  output logic [1:0]  dx_front_stall,
  output logic [1:0]  dx_back_stall,
  output logic        dx_bus_full_stall,
  // VME FIFO: host writes over BDF (HPU_CLK), VME reads (VME_CLK)
  input  logic        vf_wr,
  input  logic [31:0] vf_wdata,
  output logic        vf_full,
  input  logic        vf_rd,
  output logic [31:0] vf_rdata,
  output logic        vf_empty,
  // VME DPRAM: VME port (VME_CLK), host port over BDH/BA (HPU_CLK)
  input  logic        dp_we_v,
  input  logic [13:0] dp_addr_v,
  input  logic [31:0] dp_wdata_v,
  output logic [31:0] dp_rdata_v,
  input  logic        dp_we_h,
  input  logic [13:0] dp_addr_h,
  input  logic [31:0] dp_wdata_h,
  output logic [31:0] dp_rdata_h,
  // power PLD (oscillator clock)
  input  logic        por_n,
  input  logic        ped_wr,
  input  logic        ped_wdata,
  input  logic        mbpwrok, vaok, vbok, vcok, sysreset_n,
  output logic        pena, penb, penc, mbreset_n,
  output logic [5:0]  pwr_status
);
  clk_sel_t sel;
  logic     dx_clk, dxint_clk;

  clk_setup_pld u_clk_setup (
    .clk(hpu_clk), .rst_n(por_n), .bdg_wr, .bdg_addr, .bdg_wdata, .bdg_rdata, .sel);

  clk_network u_clk (
    .sel, .bp_rclk, .fp_rclk, .bp_tclk, .fp_tclk, .osc,
    .s_rclk, .s_sclk, .s_tclk, .s_dclk, .s_dc_clk, .s_dx_clk,
    .s_hpu_clk, .s_dpu_clk, .s_dxint_clk, .s_vme_clk,
    .rclk, .sclk, .tclk, .dclk, .dc_clk, .dx_clk, .hpu_clk, .dpu_clk, .dxint_clk, .vme_clk);

  data_exchange u_dx (
    .clk_dx(dx_clk), .clk_int(dxint_clk), .clk_d(dclk), .clk_host(hpu_clk), .rst_n,
    .instr_valid, .instr_data, .instr_ready,
    .reg_sel_b(dx_reg_sel_b), .reg_wr(dx_reg_wr), .reg_addr(dx_reg_addr),
    .reg_wdata(dx_reg_wdata), .reg_rdata(dx_reg_rdata),
    .notify_front, .notify_back,
    .dxd_src_req, .dxd_rvalid, .dxd_rlast, .dxd_rdata, .dxd_dst_wr, .dxd_wdata,
    .dxd_wready, .dxd_eoe, .dxd_sch, .dxd_dch,
    .hf_rd, .hf_rdata, .hf_empty,
    .dg_data, .dg_valid, .dg_ready, .dg_words,
    .bus_owner_b(dx_bus_owner_b), .bus_handover(dx_bus_handover),
    .front_stall(dx_front_stall), .back_stall(dx_back_stall),
    .bus_full_stall(dx_bus_full_stall));

  irod_async_fifo #(.WIDTH(32), .AW(14)) u_vme_fifo (
    .wclk(hpu_clk), .wrst_n(rst_n), .wr_en(vf_wr), .wdata(vf_wdata), .full(vf_full),
    .rclk(vme_clk), .rrst_n(rst_n), .rd_en(vf_rd), .rdata(vf_rdata), .empty(vf_empty));

  vme_dpram #(.AW(14), .DW(32)) u_vme_dpram (
    .clk_v(vme_clk), .we_v(dp_we_v), .addr_v(dp_addr_v), .wdata_v(dp_wdata_v), .rdata_v(dp_rdata_v),
    .clk_h(hpu_clk), .we_h(dp_we_h), .addr_h(dp_addr_h), .wdata_h(dp_wdata_h), .rdata_h(dp_rdata_h));

  power_pld u_power (
    .clk(osc), .por_n, .ped_wr, .ped_wdata, .mbpwrok, .vaok, .vbok, .vcok, .sysreset_n,
    .pena, .penb, .penc, .mbreset_n, .ped(), .one_o(), .status(pwr_status));
endmodule
