// vme_dpram: VME dual-port RAM between the VMEbus and the host DSP.
//
// Two independent synchronous ports, each with a 14-bit word address and 32
// data bits: port V is driven by the VME interface CPLDs, port H by the
// host over its BDH data bus and BA address bus. Both ports may read and
// write at any time; a read returns the word one clock after the address
// (registered read). When both ports write the same word in the same
// instant the result is undefined, as with a real dual-port RAM; software
// keeps them apart. The 14-bit address and 32-bit data on each side follow
// the board description; the synchronous timing and the per-port clocks are
// this design's choices.
//
// The array is written from two always_ff blocks on two different clocks.
// Lint tools report that as a signal with several drivers; here it is the
// intended structure of a true dual-port memory, and synthesis maps it to a
// dual-clock block RAM, so the warning is left standing.
module vme_dpram #(
  parameter int unsigned AW = 14,
  parameter int unsigned DW = 32
) (
  input  logic          clk_v,
  input  logic          we_v,
  input  logic [AW-1:0] addr_v,
  input  logic [DW-1:0] wdata_v,
  output logic [DW-1:0] rdata_v,
  input  logic          clk_h,
  input  logic          we_h,
  input  logic [AW-1:0] addr_h,
  input  logic [DW-1:0] wdata_h,
  output logic [DW-1:0] rdata_h
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk_v) begin
    if (we_v) mem[addr_v] <= wdata_v;
    rdata_v <= mem[addr_v];
  end

  always_ff @(posedge clk_h) begin
    if (we_h) mem[addr_h] <= wdata_h;
    rdata_h <= mem[addr_h];
  end
endmodule
