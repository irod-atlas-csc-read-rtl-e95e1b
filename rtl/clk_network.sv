// clk_network: clock selection of the ROD.
//
// The ROD receives the receive clock (RCLK) and TTC clock (TCLK) from the
// backplane or the front panel and makes a spare copy (SCLK). RCLK, SCLK
// and TCLK can each be taken from an external input, from one another, or
// from a frequency synthesizer. DCLK (DX output / S-Link), DC_CLK (DPU
// control) and DX_CLK (Data Exchange) each choose among RCLK, SCLK, TCLK or
// their own synthesizer; HPU_CLK chooses the oscillator or a synthesizer;
// DPU_CLK, DXINT_CLK and VME_CLK come from synthesizers only. The choice of
// inputs per clock is the design's; the synthesizers, oscillator, PLL
// buffers and level translators are outside this logic and their outputs
// are inputs here.
// RCLK, SCLK and TCLK may select each other, which on the board is a loop
// of three multiplexers. Here the three selects are resolved together: the
// chain of selects is followed (at most three steps) to an external source,
// and a circular choice gives a stopped clock. This gives the same clocks
// for every loop-free setting without a combinational loop in the logic.
module clk_network
  import irod_pkg::*;
(
  input  clk_sel_t sel,
  input  logic bp_rclk, fp_rclk, bp_tclk, fp_tclk, osc,
  input  logic s_rclk, s_sclk, s_tclk, s_dclk, s_dc_clk, s_dx_clk,
  input  logic s_hpu_clk, s_dpu_clk, s_dxint_clk, s_vme_clk,
  output logic rclk, sclk, tclk, dclk, dc_clk, dx_clk,
  output logic hpu_clk, dpu_clk, dxint_clk, vme_clk
);
  typedef enum logic [1:0] {N_R, N_S, N_T, N_NONE} node_e;

  // external source of a node, or the node it selects
  function automatic void step(input node_e n, input clk_sel_t s,
                               input logic [7:0] ext,
                               output logic is_ext, output logic val,
                               output node_e nx);
    // ext = {s_tclk, fp_tclk, bp_tclk, s_sclk, s_rclk, fp_rclk, bp_rclk, 1'b0}
    is_ext = 1'b1; val = 1'b0; nx = N_NONE;
    unique case (n)
      N_R: unique case (s.rclk)
             3'd0: val = ext[1];
             3'd1: val = ext[2];
             3'd2: begin is_ext = 1'b0; nx = N_S; end
             3'd3: begin is_ext = 1'b0; nx = N_T; end
             3'd4: val = ext[3];
             default: ;
           endcase
      N_S: unique case (s.sclk)
             2'd0: begin is_ext = 1'b0; nx = N_R; end
             2'd1: begin is_ext = 1'b0; nx = N_T; end
             2'd2: val = ext[4];
             default: ;
           endcase
      N_T: unique case (s.tclk)
             3'd0: val = ext[5];
             3'd1: val = ext[6];
             3'd2: begin is_ext = 1'b0; nx = N_R; end
             3'd3: begin is_ext = 1'b0; nx = N_S; end
             3'd4: val = ext[7];
             default: ;
           endcase
      default: ;
    endcase
  endfunction

  function automatic logic resolve(input node_e start, input clk_sel_t s,
                                   input logic [7:0] ext);
    node_e n, nx;
    logic is_ext, val, done, res;
    n = start; done = 1'b0; res = 1'b0;
    for (int k = 0; k < 3; k++) begin
      if (!done) begin
        step(n, s, ext, is_ext, val, nx);
        if (is_ext) begin
          res  = val;
          done = 1'b1;
        end else begin
          n = nx;
        end
      end
    end
    return res;
  endfunction

  logic [7:0] ext;
  assign ext = {s_tclk, fp_tclk, bp_tclk, s_sclk, s_rclk, fp_rclk, bp_rclk, 1'b0};

  always_comb begin
    rclk = resolve(N_R, sel, ext);
    sclk = resolve(N_S, sel, ext);
    tclk = resolve(N_T, sel, ext);
  end

  clk_mux #(.N(4)) u_dclk   (.clk_in({s_dclk,   tclk, sclk, rclk}), .sel(sel.dclk),   .clk_out(dclk));
  clk_mux #(.N(4)) u_dc_clk (.clk_in({s_dc_clk, tclk, sclk, rclk}), .sel(sel.dc_clk), .clk_out(dc_clk));
  clk_mux #(.N(4)) u_dx_clk (.clk_in({s_dx_clk, tclk, sclk, rclk}), .sel(sel.dx_clk), .clk_out(dx_clk));
  clk_mux #(.N(2)) u_hpu    (.clk_in({s_hpu_clk, osc}),             .sel(sel.hpu_clk), .clk_out(hpu_clk));

  assign dpu_clk   = s_dpu_clk;
  assign dxint_clk = s_dxint_clk;
  assign vme_clk   = s_vme_clk;
endmodule
