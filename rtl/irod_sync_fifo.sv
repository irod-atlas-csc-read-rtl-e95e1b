// irod_sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used as the DXF FPGA's instruction FIFO, which queues the DMA'd DX
// instruction stream. The head word is visible on rdata whenever empty is
// low; rd_en pops it. A write while full and a read while empty are ignored
// (and flagged by assertions). A write and a read in the same cycle are both
// taken, also when the FIFO is full. Depth is this design's choice; the
// instruction FIFO's depth is not given.
module irod_sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = 9        // depth = 2**AW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [2**AW];
  logic [AW:0] wptr, rptr;
  logic do_wr, do_rd;

  assign empty = (wptr == rptr);
  assign full  = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign count = wptr - rptr;
  assign do_rd = rd_en && !empty;
  assign do_wr = wr_en && (!full || do_rd);
  assign rdata = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (!full || rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty);
endmodule
