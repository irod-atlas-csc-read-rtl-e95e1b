// irod_async_fifo: dual-clock first-word-fall-through FIFO.
//
// The DX moves data between clock domains through FIFOs: DX_CLK to
// DXINT_CLK in each DXF FPGA, DXINT_CLK to DCLK in the DXB FPGA, DXINT_CLK to
// the host in the Host FIFO (16K x 32), and host to VME in the VME FIFO
// (16k deep). This is one generic FIFO for all of them. Pointers cross the
// clock boundary in Gray code through two-flop synchronisers, so full and
// empty are conservative: full clears, and empty clears, a few cycles of the
// other clock after the event that changes them. The head word is visible on
// rdata while empty is low; rd_en pops it. The default depth is the Host
// FIFO's 16K words. Gray-coded pointers are this design's choice.
module irod_async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = 14       // depth = 2**AW (16K)
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  logic [WIDTH-1:0] mem [2**AW];
  logic [AW:0] wbin, rbin, wgray, rgray;
  logic [AW:0] wgray_s1, wgray_s2;   // write pointer in the read domain
  logic [AW:0] rgray_s1, rgray_s2;   // read pointer in the write domain
  logic [AW:0] wbin_nx, rbin_nx, wgray_nx, rgray_nx;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wbin_nx  = wbin + {{AW{1'b0}}, (wr_en && !full)};
  assign rbin_nx  = rbin + {{AW{1'b0}}, (rd_en && !empty)};
  assign wgray_nx = bin2gray(wbin_nx);
  assign rgray_nx = bin2gray(rbin_nx);

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  end
  assign rdata = mem[rbin[AW-1:0]];

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_s1 <= '0; rgray_s2 <= '0; full <= 1'b0;
    end else begin
      wbin     <= wbin_nx;
      wgray    <= wgray_nx;
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
      full     <= (wgray_nx == {~rgray_s2[AW:AW-1], rgray_s2[AW-2:0]});
    end
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_s1 <= '0; wgray_s2 <= '0; empty <= 1'b1;
    end else begin
      rbin     <= rbin_nx;
      rgray    <= rgray_nx;
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
      empty    <= (rgray_nx == wgray_s2);
    end
  end

  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) rd_en |-> !empty);
endmodule
