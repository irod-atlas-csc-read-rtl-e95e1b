// dx_bus_arbiter: ownership of the DX internal bus.
//
// The two DXF FPGAs share the DX internal bus that feeds the back end. One
// of them owns it at a time; the owner hands it to the other by executing
// the DX command "release output bus to other DXF FPGA". Half A owns the
// bus after reset (in the example event-building stream A writes the ROD
// leader first and B returns the bus to A at the end). The owner's word is
// passed to the back end; the other half's output is ignored. Reset owner A
// is this design's choice. Ownership changes on the clock after a release.
module dx_bus_arbiter
  import irod_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    release_a,
  input  logic    release_b,
  input  dx_bus_t bus_a,
  input  dx_bus_t bus_b,
  output logic    grant_a,
  output logic    grant_b,
  output dx_bus_t bus_out,
  output logic    handover        // pulse: ownership changed
);
  logic owner_b;

  assign grant_a  = !owner_b;
  assign grant_b  = owner_b;
  assign bus_out  = owner_b ? bus_b : bus_a;
  assign handover = (grant_a && release_a) || (grant_b && release_b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        owner_b <= 1'b0;
    else if (handover) owner_b <= !owner_b;
  end

  a_a_quiet: assert property (@(posedge clk) disable iff (!rst_n) bus_a.valid |-> grant_a);
  a_b_quiet: assert property (@(posedge clk) disable iff (!rst_n) bus_b.valid |-> grant_b);
endmodule
