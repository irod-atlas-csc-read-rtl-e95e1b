// clk_mux: clock source multiplexer of the clock generation.
//
// Passes one of N clock inputs to its output, chosen by sel; a select past
// the last input gives a stopped (low) clock. On the board this is an
// analog bus-switch multiplexer (CBTLV3253) followed by a PLL or fan-out
// buffer, so switching is not glitch-free: selects are set up while the
// clocked logic is held in reset. Combinational, no clock of its own.
module clk_mux #(
  parameter int unsigned N  = 4,
  parameter int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  clk_in,
  input  logic [SW-1:0] sel,
  output logic          clk_out
);
  always_comb begin
    clk_out = 1'b0;
    for (int i = 0; i < N; i++)
      if (sel == SW'(i)) clk_out = clk_in[i];
  end
endmodule
