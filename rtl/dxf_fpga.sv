// dxf_fpga: one front FPGA of the Data Exchange (DX half A or B).
//
// The host DMAs a stream of DX instructions over the host data bus (BDH).
// The instruction filter keeps what is addressed to this half and queues it
// in the instruction FIFO. The instruction analysis (dxf_front_seq) carries
// the instructions out on the DXD bus, which links the six DPUs of this half,
// and fills the tag+data FIFO. That FIFO crosses from DX_CLK to DXINT_CLK;
// on the far side the tag and command analysis (dxf_back_seq) puts data on
// the DX internal bus (33rd bit = control flag C) and executes DX commands.
// Each side has a data transfer counter with comparator (dx_counter_cmp).
//
// Host register map (DX_CLK domain, reg_addr):
//   0 control  (R/W) bit0 front enable, bit1 back enable (both 1 after reset)
//   1 status   (R)   bit0 front verify error, bit1 back verify error,
//                    bit2 instruction FIFO empty, bit3 instruction FIFO full,
//                    bit4 tag+data FIFO full, bit5 front end busy
//   2 front counter captured value (R)
//   3 back counter captured value (R); a capture is quasi-static, so the host
//     reads it after the notify-back that follows the capture command.
// The block structure follows the design's DXF diagram; the register map,
// FIFO depths and the DXD handshake are this design's choices. Reset is
// asynchronous; rst_n must be released while both clocks are quiet or be
// synchronised outside.
module dxf_fpga
  import irod_pkg::*;
#(
  parameter bit          HALF_B = 1'b0,   // 0: half A, 1: half B
  parameter int unsigned IF_AW  = 9,      // instruction FIFO depth 2**IF_AW
  parameter int unsigned DF_AW  = 9       // tag+data FIFO depth 2**DF_AW
) (
  input  logic              clk_dx,       // DX_CLK
  input  logic              clk_int,      // DXINT_CLK
  input  logic              rst_n,
  // host instruction stream (BDH)
  input  logic              instr_valid,
  input  logic [31:0]       instr_data,
  output logic              instr_ready,
  // host registers (BDH)
  input  logic              reg_wr,
  input  logic [1:0]        reg_addr,
  input  logic [31:0]       reg_wdata,
  output logic [31:0]       reg_rdata,
  output logic              notify_front, // DX_CLK pulse to host
  output logic              notify_back,  // DXINT_CLK pulse to host
  // DXD bus
  output logic [NUM_DPU-1:0] dxd_src_req,
  input  logic              dxd_rvalid,
  input  logic              dxd_rlast,
  input  logic [31:0]       dxd_rdata,
  output logic [NUM_DPU-1:0] dxd_dst_wr,
  output logic [31:0]       dxd_wdata,
  input  logic              dxd_wready,
  output logic              dxd_eoe,
  output logic              dxd_sch,
  output logic              dxd_dch,
  // DX internal bus (DXINT_CLK)
  input  logic              bus_grant,
  input  logic              bus_ready,
  output dx_bus_t           bus_out,
  output logic              bus_release,
  // event counters for monitoring
  output logic              front_stall,
  output logic              back_stall
);
  // ---------------- front side (DX_CLK) ----------------
  logic        flt_valid, flt_ready;
  logic [31:0] flt_data;
  logic        if_full, if_empty, if_rd;
  logic [31:0] if_rdata;
  logic [IF_AW:0] if_count;
  logic        df_wr, df_full;
  dx_entry_t   df_wdata;
  logic        fc_inc, fc_clr, fc_cap, fc_ver, fc_err, fc_mis;
  logic [15:0] fc_v;
  logic [31:0] fc_count, fc_captured;
  logic [1:0]  ctrl;
  logic        front_busy;
  logic        bc_err_s1, bc_err_s2;

  dxf_instr_filter #(.HALF_B(HALF_B)) u_filter (
    .clk(clk_dx), .rst_n,
    .in_valid(instr_valid), .in_data(instr_data), .in_ready(instr_ready),
    .out_valid(flt_valid), .out_data(flt_data), .out_ready(flt_ready));

  assign flt_ready = !if_full;

  irod_sync_fifo #(.WIDTH(32), .AW(IF_AW)) u_instr_fifo (
    .clk(clk_dx), .rst_n,
    .wr_en(flt_valid && !if_full), .wdata(flt_data), .full(if_full),
    .rd_en(if_rd), .rdata(if_rdata), .empty(if_empty), .count(if_count));

  dxf_front_seq u_front (
    .clk(clk_dx), .rst_n, .enable(ctrl[0]),
    .if_empty, .if_rdata, .if_rd,
    .dxd_src_req, .dxd_rvalid, .dxd_rlast, .dxd_rdata,
    .dxd_dst_wr, .dxd_wdata, .dxd_wready, .dxd_eoe, .dxd_sch, .dxd_dch,
    .df_wr, .df_wdata, .df_full,
    .cnt_inc(fc_inc), .cnt_clr(fc_clr), .cnt_cap(fc_cap), .cnt_ver(fc_ver), .cnt_v(fc_v),
    .notify(notify_front), .busy(front_busy), .stall(front_stall));

  dx_counter_cmp #(.CW(32)) u_front_cnt (
    .clk(clk_dx), .rst_n, .inc(fc_inc), .clr(fc_clr), .cap(fc_cap), .ver(fc_ver),
    .v(fc_v), .count(fc_count), .captured(fc_captured), .mismatch(fc_mis), .err(fc_err));

  // ---------------- tag+data FIFO (DX_CLK -> DXINT_CLK) ----------------
  logic      df_empty, df_rd;
  dx_entry_t df_rdata;

  irod_async_fifo #(.WIDTH($bits(dx_entry_t)), .AW(DF_AW)) u_data_fifo (
    .wclk(clk_dx), .wrst_n(rst_n), .wr_en(df_wr), .wdata(df_wdata), .full(df_full),
    .rclk(clk_int), .rrst_n(rst_n), .rd_en(df_rd), .rdata(df_rdata), .empty(df_empty));

  // ---------------- back side (DXINT_CLK) ----------------
  logic        bc_inc, bc_clr, bc_cap, bc_ver, bc_err, bc_mis;
  logic [15:0] bc_v;
  logic [31:0] bc_count, bc_captured;
  logic        back_en_s1, back_en_s2;

  always_ff @(posedge clk_int or negedge rst_n) begin
    if (!rst_n) begin
      back_en_s1 <= 1'b1;
      back_en_s2 <= 1'b1;
    end else begin
      back_en_s1 <= ctrl[1];
      back_en_s2 <= back_en_s1;
    end
  end

  dxf_back_seq u_back (
    .clk(clk_int), .rst_n, .enable(back_en_s2),
    .df_empty, .df_rdata, .df_rd,
    .bus_grant, .bus_ready, .bus_out, .bus_release,
    .cnt_inc(bc_inc), .cnt_clr(bc_clr), .cnt_cap(bc_cap), .cnt_ver(bc_ver), .cnt_v(bc_v),
    .notify(notify_back), .stall(back_stall));

  dx_counter_cmp #(.CW(32)) u_back_cnt (
    .clk(clk_int), .rst_n, .inc(bc_inc), .clr(bc_clr), .cap(bc_cap), .ver(bc_ver),
    .v(bc_v), .count(bc_count), .captured(bc_captured), .mismatch(bc_mis), .err(bc_err));

  // ---------------- control / status registers (DX_CLK) ----------------
  always_ff @(posedge clk_dx or negedge rst_n) begin
    if (!rst_n) begin
      ctrl      <= 2'b11;
      bc_err_s1 <= 1'b0;
      bc_err_s2 <= 1'b0;
    end else begin
      if (reg_wr && reg_addr == 2'd0) ctrl <= reg_wdata[1:0];
      bc_err_s1 <= bc_err;
      bc_err_s2 <= bc_err_s1;
    end
  end

  always_comb begin
    unique case (reg_addr)
      2'd0: reg_rdata = {30'd0, ctrl};
      2'd1: reg_rdata = {26'd0, front_busy, df_full, if_full, if_empty, bc_err_s2, fc_err};
      2'd2: reg_rdata = fc_captured;
      default: reg_rdata = bc_captured;
    endcase
  end
endmodule
