// tb_clk_network: random source levels and random selects; each output is
// compared with a model that follows the select chain among RCLK, SCLK and
// TCLK (a circular choice gives 0), including the circular settings.
`timescale 1ns/1ps
module tb_clk_network;
  import irod_pkg::*;
  clk_sel_t sel;
  logic bp_rclk, fp_rclk, bp_tclk, fp_tclk, osc;
  logic s_rclk, s_sclk, s_tclk, s_dclk, s_dc_clk, s_dx_clk, s_hpu_clk, s_dpu_clk, s_dxint_clk, s_vme_clk;
  logic rclk, sclk, tclk, dclk, dc_clk, dx_clk, hpu_clk, dpu_clk, dxint_clk, vme_clk;
  clk_network dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  // model: node 0 = R, 1 = S, 2 = T
  function automatic logic model(int node);
    bit visited [3] = '{0, 0, 0};
    for (int k = 0; k < 4; k++) begin
      if (visited[node]) return 1'b0;
      visited[node] = 1;
      case (node)
        0: case (sel.rclk) 0: return bp_rclk; 1: return fp_rclk; 2: node = 1; 3: node = 2; 4: return s_rclk; default: return 1'b0; endcase
        1: case (sel.sclk) 0: node = 0; 1: node = 2; 2: return s_sclk; default: return 1'b0; endcase
        default: case (sel.tclk) 0: return bp_tclk; 1: return fp_tclk; 2: node = 0; 3: node = 1; 4: return s_tclk; default: return 1'b0; endcase
      endcase
    end
    return 1'b0;
  endfunction
  function automatic logic pick4(logic [1:0] s, logic synth);
    case (s) 0: return model(0); 1: return model(1); 2: return model(2); default: return synth; endcase
  endfunction
  int loops = 0;
  initial begin
    for (int i = 0; i < 3000; i++) begin
      sel = clk_sel_t'($urandom);
      {bp_rclk, fp_rclk, bp_tclk, fp_tclk, osc} = 5'($urandom);
      {s_rclk, s_sclk, s_tclk, s_dclk, s_dc_clk, s_dx_clk, s_hpu_clk, s_dpu_clk, s_dxint_clk, s_vme_clk} = 10'($urandom);
      #1;
      check(rclk == model(0) && sclk == model(1) && tclk == model(2), "RCLK/SCLK/TCLK");
      check(dclk == pick4(sel.dclk, s_dclk) && dc_clk == pick4(sel.dc_clk, s_dc_clk) &&
            dx_clk == pick4(sel.dx_clk, s_dx_clk), "DCLK/DC_CLK/DX_CLK");
      check(hpu_clk == (sel.hpu_clk ? s_hpu_clk : osc), "HPU_CLK");
      check(dpu_clk == s_dpu_clk && dxint_clk == s_dxint_clk && vme_clk == s_vme_clk, "synth-only clocks");
      if (sel.rclk == 2 && sel.sclk == 0) loops++;
    end
    check(loops > 0, "circular selection exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
