// clk_setup_pld: setup register of the clock generation.
//
// The host DSP writes the clock multiplexer selects over the 4-bit BDG
// segment of its data bus; this PLD holds them and drives the multiplexers.
// One 4-bit register per multiplexer, chosen by a 3-bit address taken from
// the host address bus:
//   0 RCLK (3 bits)  1 SCLK (2)  2 TCLK (3)  3 DCLK (2)
//   4 DC_CLK (2)     5 DX_CLK (2)  6 HPU_CLK (1)
// Unused high bits read as zero; address 7 reads zero. After reset RCLK and
// TCLK come from the backplane, SCLK from TCLK, DCLK, DC_CLK and DX_CLK from
// their synthesizers and HPU_CLK from the oscillator. Only the 4-bit width
// of the bus is the design's; the register map and reset values are this
// design's choices. Writes take effect on the next clock edge.
module clk_setup_pld
  import irod_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bdg_wr,
  input  logic [2:0] bdg_addr,
  input  logic [3:0] bdg_wdata,
  output logic [3:0] bdg_rdata,
  output clk_sel_t   sel
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel <= CLK_SEL_RESET;
    end else if (bdg_wr) begin
      unique case (bdg_addr)
        3'd0: sel.rclk    <= bdg_wdata[2:0];
        3'd1: sel.sclk    <= bdg_wdata[1:0];
        3'd2: sel.tclk    <= bdg_wdata[2:0];
        3'd3: sel.dclk    <= bdg_wdata[1:0];
        3'd4: sel.dc_clk  <= bdg_wdata[1:0];
        3'd5: sel.dx_clk  <= bdg_wdata[1:0];
        3'd6: sel.hpu_clk <= bdg_wdata[0];
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (bdg_addr)
      3'd0: bdg_rdata = {1'b0, sel.rclk};
      3'd1: bdg_rdata = {2'b0, sel.sclk};
      3'd2: bdg_rdata = {1'b0, sel.tclk};
      3'd3: bdg_rdata = {2'b0, sel.dclk};
      3'd4: bdg_rdata = {2'b0, sel.dc_clk};
      3'd5: bdg_rdata = {2'b0, sel.dx_clk};
      3'd6: bdg_rdata = {3'b0, sel.hpu_clk};
      default: bdg_rdata = 4'd0;
    endcase
  end
endmodule
