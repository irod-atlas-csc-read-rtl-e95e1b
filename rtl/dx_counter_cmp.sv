// dx_counter_cmp: data transfer counter with capture register and comparator.
//
// Each DXF FPGA has two of these: the front-end counter counts words moved by
// the instruction analysis, the back-end counter counts data words leaving
// the tag+data FIFO. The counter is reset, captured and verified by DX
// instructions (front) or DX commands (back). A verify compares the
// counter's 16 least significant bits with the 16-bit value V; a mismatch
// sets the sticky err flag, which the next counter reset clears. The counter
// width (32) and the way err is cleared are this design's choices.
// All controls are single-cycle strobes; clr has priority over inc.
module dx_counter_cmp #(
  parameter int unsigned CW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          inc,       // one word transferred
  input  logic          clr,       // reset counter (and err)
  input  logic          cap,       // copy counter to captured
  input  logic          ver,       // compare counter LSBs with v
  input  logic [15:0]   v,
  output logic [CW-1:0] count,
  output logic [CW-1:0] captured,
  output logic          mismatch,  // pulse: this verify failed
  output logic          err        // sticky verify failure
);
  assign mismatch = ver && (count[15:0] != v);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      captured <= '0;
      err      <= 1'b0;
    end else begin
      if (clr)      count <= '0;
      else if (inc) count <= count + 1'b1;
      if (cap)      captured <= count;
      if (clr)           err <= 1'b0;
      else if (mismatch) err <= 1'b1;
    end
  end
endmodule
