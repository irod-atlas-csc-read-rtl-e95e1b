// tb_dxf_instr_filter: a random DX instruction stream (targets A, B, both,
// neither; payload words that look like instructions) through the half-B
// filter with random back-pressure; the output must be exactly the
// instructions targeted at B with their payloads, in order.
`timescale 1ns/1ps
module tb_dxf_instr_filter;
  import tb_dx_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [31:0] in_data = 0, out_data;
  always #5 clk = ~clk;
  dxf_instr_filter #(.HALF_B(1'b1)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [31:0] stim [$], expq [$];
  int got = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      check(expq.size() > 0 && out_data == expq[0], $sformatf("output word %0d %h", got, out_data));
      if (expq.size()) void'(expq.pop_front());
      got++;
    end
  end
  initial begin
    for (int i = 0; i < 300; i++) begin
      logic [1:0] ab; int k; logic [7:0] n; logic [31:0] w;
      ab = 2'($urandom); k = $urandom_range(0, 3);
      n = 8'($urandom_range(0, 4));
      case (k)
        0: w = i_wdata(tag_data(1, 1, 0), ab, 0, 1, 6'h3, n);
        1: w = i_wcmd(ab, n);
        2: begin w = i_run(tag_data(0, 1, 1), ab, 1, 0, 0, 1, 6'h20, 6'h1f); n = 0; end
        default: begin w = i_simple(4'($urandom_range(4, 7)), ab, 16'($urandom)); n = 0; end
      endcase
      stim.push_back(w); if (ab[0]) expq.push_back(w);
      for (int j = 0; j < n; j++) begin
        // payload that looks like a B-targeted write with payload
        logic [31:0] p; p = i_wdata(4'hF, 2'b11, 0, 0, 6'h0, 8'd3) ^ 32'(j);
        stim.push_back(p); if (ab[0]) expq.push_back(p);
      end
    end
    repeat (2) @(negedge clk); rst_n = 1;
    foreach (stim[i]) begin
      @(negedge clk); in_valid = 1; in_data = stim[i];
      out_ready = $urandom_range(0, 2) != 0; #1;
      while (!in_ready) begin @(negedge clk); out_ready = $urandom_range(0, 2) != 0; #1; end
      @(posedge clk); #1 in_valid = 0;
    end
    @(negedge clk); out_ready = 1;
    repeat (3) @(posedge clk);
    check(expq.size() == 0, "all targeted words passed");
    check(got > 100, "enough words passed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
