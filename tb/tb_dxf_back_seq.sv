// tb_dxf_back_seq: the tag and command analysis against a queue-fed
// tag+data FIFO. Checks data words leave with C and F on the bus only while
// granted and ready, F=00 words are dropped but counted, release waits for
// ownership, the counter strobes and notify, and one entry per clock.
`timescale 1ns/1ps
module tb_dxf_back_seq;
  import irod_pkg::*;
  import tb_dx_pkg::*;
  logic clk = 0, rst_n = 0, enable = 1;
  logic df_empty, df_rd, bus_grant = 0, bus_ready = 1, bus_release;
  dx_entry_t df_rdata;
  dx_bus_t bus_out;
  logic cnt_inc, cnt_clr, cnt_cap, cnt_ver, notify, stall;
  logic [15:0] cnt_v;
  always #5 clk = ~clk;
  dxf_back_seq dut (.*);

  dx_entry_t q [$];
  initial begin df_empty = 1'b1; df_rdata = '0; end
  function automatic void refresh();
    df_empty = (q.size() == 0);
    df_rdata = q.size() ? q[0] : '0;
  endfunction
  function automatic void qpush(logic [3:0] tag, logic [31:0] d);
    q.push_back('{tag: tag, data: d});
    refresh();
  endfunction
  always @(posedge clk) if (df_rd && q.size()) begin #1; void'(q.pop_front()); refresh(); end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  dx_bus_t outq [$];
  int n_inc = 0, n_clr = 0, n_cap = 0, n_ver = 0, n_not = 0, n_rel = 0, n_stall = 0, bad_drive = 0;
  logic [15:0] last_v;
  always @(negedge clk) if (rst_n) begin
    if (bus_out.valid) outq.push_back(bus_out);
    if (bus_out.valid && !(bus_grant && bus_ready)) bad_drive++;
    if (bus_release && !bus_grant) bad_drive++;
    n_inc += cnt_inc; n_clr += cnt_clr; n_cap += cnt_cap; n_not += notify;
    n_rel += bus_release; n_stall += stall;
    if (cnt_ver) begin n_ver++; last_v = cnt_v; end
  end
  int cyc;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    // without ownership nothing moves except F=00 data and commands
    qpush(tag_data(1, 1, 0), 32'h100);
    repeat (5) @(negedge clk);
    check(q.size() == 1 && outq.size() == 0 && n_stall > 0, "waits for the bus");
    bus_grant = 1;
    @(negedge clk); @(negedge clk);
    check(q.size() == 0 && outq.size() == 1, "goes when granted");
    check(outq[0].ctrl && outq[0].rol_en && !outq[0].host_en && outq[0].data == 32'h100, "C and F carried");
    // a run of entries, timed: 8 data words at one per clock
    for (int i = 0; i < 8; i++) qpush(tag_data(0, i[0], !i[0]), 32'h200 + i);
    cyc = 0;
    while (q.size()) begin @(negedge clk); cyc++; end
    check(cyc == 8, $sformatf("8 words in %0d clocks", cyc));
    // commands and back-pressure
    qpush(tag_data(0, 0, 0), 32'h300);        // goes nowhere, counted
    qpush(4'h0, c_word(4'b0101, 0));          // reset back counter
    qpush(4'h0, c_word(4'b0110, 0));          // capture
    qpush(4'h0, c_word(4'b0111, 16'hCAFE));   // verify
    qpush(4'h0, c_word(4'b0100, 0));          // notify
    qpush(4'h0, c_word(4'b0000, 0));          // NOP
    qpush(tag_data(0, 1, 1), 32'h400);
    bus_ready = 0;
    repeat (10) @(negedge clk);
    check(q.size() == 1, "stops at data while back end is full");
    bus_ready = 1;
    @(negedge clk); @(negedge clk);
    check(q.size() == 0 && outq.size() == 10, $sformatf("bus words %0d", outq.size()));
    // release waits for ownership
    bus_grant = 0;
    qpush(4'h0, c_word(4'b0011, 0));
    repeat (4) @(negedge clk);
    check(q.size() == 1 && n_rel == 0, "release waits for ownership");
    bus_grant = 1;
    @(negedge clk); @(negedge clk);
    check(q.size() == 0 && n_rel == 1, "release when owner");
    check(n_inc == 1 + 8 + 1 + 1, $sformatf("back counter increments %0d", n_inc));
    check(n_clr == 1 && n_cap == 1 && n_ver == 1 && last_v == 16'hCAFE && n_not == 1, "command strobes");
    check(bad_drive == 0, "never drives without ownership");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
