// dxb_fpga: back FPGA of the Data Exchange.
//
// Takes the words on the DX internal bus that carry the ROL (read-out link)
// FIFO enable and queues them, 33 bits wide (32 data bits plus the control
// flag C), in a FIFO that crosses from DXINT_CLK to DCLK. On the DCLK side
// the words are sent to the backplane connector P0 (the DG lines, e.g. an
// S-Link source card) through an output register with a valid/ready
// handshake: dg_ready low (the link's back-pressure) holds the word. The
// 33-bit FIFO and its clocks follow the design; the depth and the handshake
// are this design's choices. A word count of what was sent is kept for
// monitoring.
module dxb_fpga
  import irod_pkg::*;
#(
  parameter int unsigned AW = 10          // FIFO depth 2**AW
) (
  input  logic        clk_int,            // DXINT_CLK
  input  logic        clk_d,              // DCLK
  input  logic        rst_n,
  input  dx_bus_t     bus_in,
  output logic        full,
  output logic [32:0] dg_data,            // {C, data}
  output logic        dg_valid,
  input  logic        dg_ready,
  output logic [31:0] dg_words            // words sent on DG
);
  logic        f_empty, f_rd;
  logic [32:0] f_rdata;

  irod_async_fifo #(.WIDTH(33), .AW(AW)) u_fifo (
    .wclk(clk_int), .wrst_n(rst_n),
    .wr_en(bus_in.valid && bus_in.rol_en), .wdata({bus_in.ctrl, bus_in.data}), .full,
    .rclk(clk_d), .rrst_n(rst_n), .rd_en(f_rd), .rdata(f_rdata), .empty(f_empty));

  // refill the output register when it is empty or being taken
  assign f_rd = !f_empty && (!dg_valid || dg_ready);

  always_ff @(posedge clk_d or negedge rst_n) begin
    if (!rst_n) begin
      dg_valid <= 1'b0;
      dg_data  <= '0;
      dg_words <= '0;
    end else begin
      if (dg_valid && dg_ready) dg_words <= dg_words + 1'b1;
      if (f_rd) begin
        dg_valid <= 1'b1;
        dg_data  <= f_rdata;
      end else if (dg_ready) begin
        dg_valid <= 1'b0;
      end
    end
  end
endmodule
