// tb_dxf_front_seq: the instruction analysis against a queue-fed
// instruction FIFO, the DPU model and a data FIFO model that, while
// throttled, is full two clocks out of three.
// Checks: a front sequence visits the sources in index order and stops at
// each source's last word; destinations and the data FIFO get every word
// with the instruction's tag; write-N-data and write-N-command move exactly
// N words with the right tags; counter strobes, notify and end-of-event
// marks; and one word per clock when nothing stalls.
`timescale 1ns/1ps
module tb_dxf_front_seq;
  import irod_pkg::*;
  import tb_dx_pkg::*;
  logic clk = 0, rst_n = 0, enable = 1;
  logic if_empty, if_rd;
  logic [31:0] if_rdata;
  logic [5:0] dxd_src_req, dxd_dst_wr;
  logic dxd_rvalid, dxd_rlast, dxd_wready, dxd_eoe, dxd_sch, dxd_dch;
  logic [31:0] dxd_rdata, dxd_wdata;
  logic df_wr, df_full = 0;
  dx_entry_t df_wdata;
  logic cnt_inc, cnt_clr, cnt_cap, cnt_ver, notify, busy, stall;
  logic [15:0] cnt_v;
  logic throttle = 0;
  always #5 clk = ~clk;
  dxf_front_seq dut (.*);

  int len [6] = '{3, 1, 4, 2, 5, 7};
  int rxc [6];
  longint rxs [6];
  int eoec;
  dxd_model #(.HALF(0)) u_m (.clk, .rst_n, .throttle, .len, .src_req(dxd_src_req),
    .rvalid(dxd_rvalid), .rlast(dxd_rlast), .rdata(dxd_rdata), .dst_wr(dxd_dst_wr),
    .wdata(dxd_wdata), .wready(dxd_wready), .rx_count(rxc), .rx_sum(rxs), .eoe_count(eoec),
    .eoe(dxd_eoe));

  logic [31:0] iq [$];
  // instruction FIFO model; flags are refreshed after every change of iq
  initial begin if_empty = 1'b1; if_rdata = '0; end
  function automatic void refresh();
    if_empty = (iq.size() == 0);
    if_rdata = iq.size() ? iq[0] : 32'h0;
  endfunction
  function automatic void ipush(logic [31:0] w);
    iq.push_back(w);
    refresh();
  endfunction
  always @(posedge clk) if (if_rd && iq.size()) begin #1; void'(iq.pop_front()); refresh(); end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  dx_entry_t dfq [$];
  int n_inc = 0, n_clr = 0, n_cap = 0, n_ver = 0, n_not = 0, n_stall = 0;
  logic [15:0] last_v;
  int full_phase = 0;
  always @(posedge clk) if (rst_n) begin
    if (df_wr) dfq.push_back(df_wdata);
    n_inc += cnt_inc; n_clr += cnt_clr; n_cap += cnt_cap; n_not += notify; n_stall += stall;
    if (cnt_ver) begin n_ver++; last_v = cnt_v; end
    // when throttled the FIFO is full two clocks out of three, so back-to-back
    // words always meet a full FIFO
    full_phase <= (full_phase == 2) ? 0 : full_phase + 1;
    df_full <= throttle && (full_phase != 0);
  end

  int cyc;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // 1) run front sequence: sources 0,2,5 -> DPU 1,3 and data FIFO, timed
    ipush(i_run(tag_data(1, 1, 0), 2'b11, 1, 1, 0, 1, 6'b001010, 6'b100101));
    cyc = 0;
    @(negedge clk);
    while (busy || iq.size()) begin @(negedge clk); cyc++; end
    check(cyc == 3 + 4 + 7, $sformatf("front sequence took %0d clocks for 14 words", cyc));
    check(rxc[1] == 14 && rxc[3] == 14 && rxc[0] == 0, "destinations got 14 words");
    check(dfq.size() == 14, "data FIFO got 14 words");
    begin
      int k = 0; bit ok = 1;
      foreach (len[s]) if (s == 0 || s == 2 || s == 5)
        for (int i = 0; i < len[s]; i++) begin
          ok &= (dfq[k].data == dpu_word(0, s, 0, i)) && (dfq[k].tag == tag_data(1, 1, 0));
          k++;
        end
      check(ok, "source order and tags");
    end
    check(eoec == 1, "one end-of-event mark");
    dfq.delete();
    // 2) write 3 data words to DPU 4 only, 2 to the data FIFO only, 2 command words
    throttle = 1;
    ipush(i_wdata(tag_data(0, 0, 1), 2'b10, 0, 0, 6'b010000, 8'd3));
    ipush(32'hA0); ipush(32'hA1); ipush(32'hA2);
    ipush(i_wdata(tag_data(1, 1, 1), 2'b10, 1, 1, 6'b0, 8'd2));
    ipush(32'hB0); ipush(32'hB1);
    ipush(i_wcmd(2'b10, 8'd2));
    ipush(c_word(4'b0011, 0)); ipush(c_word(4'b0111, 16'h55));
    ipush(i_simple(4'b0101, 2'b10, 0));
    ipush(i_simple(4'b0110, 2'b10, 0));
    ipush(i_simple(4'b0111, 2'b10, 16'h1234));
    ipush(i_simple(4'b0100, 2'b10, 0));
    ipush(i_simple(4'b0000, 2'b10, 0));
    // zero-length write: no payload
    ipush(i_wdata(tag_data(1, 0, 0), 2'b10, 0, 1, 6'b0, 8'd0));
    @(negedge clk);
    while (busy || iq.size()) @(negedge clk);
    repeat (2) @(negedge clk);
    check(rxc[4] == 3 && rxs[4] == 32'hA0 + 32'hA1 + 32'hA2, "3 words to DPU 4");
    check(dfq.size() == 4, $sformatf("data FIFO got %0d entries, expected 4", dfq.size()));
    if (dfq.size() == 4) begin
      check(dfq[0].tag == tag_data(1, 1, 1) && dfq[0].data == 32'hB0, "data word B0");
      check(dfq[1].tag == tag_data(1, 1, 1) && dfq[1].data == 32'hB1, "data word B1");
      check(dfq[2].tag == 4'h0 && dfq[2].data == c_word(4'b0011, 0), "command release");
      check(dfq[3].tag == 4'h0 && dfq[3].data == c_word(4'b0111, 16'h55), "command verify");
    end
    check(n_inc == 14 + 3 + 2, $sformatf("front counter increments %0d", n_inc));
    check(n_clr == 1 && n_cap == 1 && n_ver == 1 && last_v == 16'h1234, "counter strobes");
    check(n_not == 1, "notify front");
    check(eoec == 2, "end-of-event on write with E");
    check(n_stall > 0, "stalled on a full data FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
