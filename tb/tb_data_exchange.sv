// tb_data_exchange: event building through the whole Data Exchange.
//
// Runs the CSC example: per level-1 event the host sends the 12-word DX
// instruction stream (sparsified data SPU0..SPU4 -> RPU on both halves, ROD
// leader from half A, RPU -> back end on both halves, A releases the DX
// internal bus to B, CSC trailer from B, B returns the bus to A). Checks
// that the backplane (DG) stream is leader, RPU A block, RPU B block,
// trailer (24 words per event) with the right control bits, that the RPUs
// receive the SPU words, that events flagged for the host also reach the
// Host FIFO, that counters verify and capture correctly, that a wrong
// verify sets the error flag, and the throughput against the 10 us event
// period of a 100 kHz trigger. Small back-end FIFOs and a throttled link
// make the stall paths happen; each mechanism is counted.
`timescale 1ns/1ps
module tb_data_exchange;
  import tb_dx_pkg::*;
  localparam int NEV = 6, SPU_LEN = 4, RPU_LEN = 10;

  logic clk_dx = 0, clk_int = 0, clk_d = 0, clk_host = 0, rst_n = 0;
  always #12.5 clk_dx = ~clk_dx;     // 40 MHz
  always #8    clk_int = ~clk_int;   // 62.5 MHz
  always #12.5 clk_d = ~clk_d;       // 40 MHz
  always #10   clk_host = ~clk_host; // 50 MHz

  logic instr_valid = 0, instr_ready;
  logic [31:0] instr_data = 0;
  logic reg_sel_b = 0, reg_wr = 0;
  logic [1:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic [1:0] notify_front, notify_back;
  logic [1:0][5:0] src_req, dst_wr;
  logic [1:0] rvalid, rlast, wready, eoe, sch, dch;
  logic [1:0][31:0] rdata, wdata;
  logic hf_rd = 0, hf_empty;
  logic [31:0] hf_rdata;
  logic [32:0] dg_data;
  logic dg_valid, dg_ready;
  logic [31:0] dg_words;
  logic owner_b, handover, full_stall;
  logic [1:0] fstall, bstall;
  logic throttle = 0;

  data_exchange #(.DF_AW(3), .DXB_AW(3)) dut (
    .clk_dx, .clk_int, .clk_d, .clk_host, .rst_n,
    .instr_valid, .instr_data, .instr_ready,
    .reg_sel_b, .reg_wr, .reg_addr, .reg_wdata, .reg_rdata,
    .notify_front, .notify_back,
    .dxd_src_req(src_req), .dxd_rvalid(rvalid), .dxd_rlast(rlast), .dxd_rdata(rdata),
    .dxd_dst_wr(dst_wr), .dxd_wdata(wdata), .dxd_wready(wready), .dxd_eoe(eoe),
    .dxd_sch(sch), .dxd_dch(dch),
    .hf_rd, .hf_rdata, .hf_empty, .dg_data, .dg_valid, .dg_ready, .dg_words,
    .bus_owner_b(owner_b), .bus_handover(handover), .front_stall(fstall),
    .back_stall(bstall), .bus_full_stall(full_stall));

  int len [6] = '{SPU_LEN, SPU_LEN, SPU_LEN, SPU_LEN, SPU_LEN, RPU_LEN};
  int rxc [2][6];
  longint rxs [2][6];
  int eoec [2];
  for (genvar h = 0; h < 2; h++) begin : g_dpu
    dxd_model #(.HALF(h)) u_m (
      .clk(clk_dx), .rst_n, .throttle, .len, .src_req(src_req[h]), .rvalid(rvalid[h]),
      .rlast(rlast[h]), .rdata(rdata[h]), .dst_wr(dst_wr[h]), .wdata(wdata[h]),
      .wready(wready[h]), .rx_count(rxc[h]), .rx_sum(rxs[h]), .eoe_count(eoec[h]), .eoe(eoe[h]));
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected streams
  logic [32:0] exp_dg [$];
  logic [31:0] exp_hf [$];
  int n_instr_words = 0;

  task automatic push(logic [31:0] w);
    // drive at the falling edge, take at the rising edge
    @(negedge clk_dx);
    instr_valid = 1'b1;
    instr_data  = w;
    #1;
    while (!instr_ready) begin @(negedge clk_dx); #1; end
    @(posedge clk_dx);
    #1 instr_valid = 1'b0;
    n_instr_words++;
  endtask

  function automatic logic [31:0] leader(int ev, int i);  return 32'hEE00_0000 | (ev << 8) | i; endfunction
  function automatic logic [31:0] trailer(int ev, int i); return 32'hDD00_0000 | (ev << 8) | i; endfunction

  task automatic send_event(int ev, bit to_host);
    // build sparsified event: SPU's -> RPU, both halves, end of event
    push(i_run(4'h0, 2'b11, 1, 0, 0, 0, 6'b100000, 6'b011111));
    // leader to back end, half A
    push(i_wdata(tag_data(1, 1, 0), 2'b10, 0, 1, 6'b0, 8'd2));
    push(leader(ev, 0)); push(leader(ev, 1));
    // RPU -> back end, both halves
    push(i_run(tag_data(0, 1, to_host), 2'b11, 0, 0, 0, 1, 6'b0, 6'b100000));
    // A releases the DX internal bus to B
    push(i_wcmd(2'b10, 8'd1)); push(c_word(4'b0011, 16'h0));
    // trailer, half B
    push(i_wdata(tag_data(1, 1, 0), 2'b01, 0, 1, 6'b0, 8'd2));
    push(trailer(ev, 0)); push(trailer(ev, 1));
    // B returns the bus to A
    push(i_wcmd(2'b01, 8'd1)); push(c_word(4'b0011, 16'h0));
    // expected back-end stream
    exp_dg.push_back({1'b1, leader(ev, 0)}); exp_dg.push_back({1'b1, leader(ev, 1)});
    for (int h = 0; h < 2; h++)
      for (int i = 0; i < RPU_LEN; i++) begin
        exp_dg.push_back({1'b0, dpu_word(h, 5, ev, i)});
        if (to_host) exp_hf.push_back(dpu_word(h, 5, ev, i));
      end
    exp_dg.push_back({1'b1, trailer(ev, 0)}); exp_dg.push_back({1'b1, trailer(ev, 1)});
  endtask

  // DG receiver
  int dg_got = 0, dg_bad = 0;
  always @(posedge clk_d) begin
    dg_ready <= throttle ? ($urandom_range(0, 2) == 0) : 1'b1;
    if (rst_n && dg_valid && dg_ready) begin
      dg_got++;
      if (exp_dg.size() == 0 || dg_data != exp_dg[0]) begin
        dg_bad++;
        $display("DG word %0d: got %h expected %h", dg_got, dg_data,
                 exp_dg.size() ? exp_dg[0] : 33'h0);
      end
      if (exp_dg.size()) void'(exp_dg.pop_front());
    end
  end

  // mechanism counters
  int n_handover = 0, n_fstall = 0, n_bstall = 0, n_fullstall = 0, n_nf = 0, n_nb = 0;
  always @(posedge clk_int) begin
    if (rst_n) begin
      n_handover += handover;
      n_bstall   += (bstall != 0);
      n_fullstall += full_stall;
      n_nb += notify_back[0] + notify_back[1];
    end
  end
  always @(posedge clk_dx) if (rst_n) begin
    n_fstall += (fstall != 0);
    n_nf += notify_front[0] + notify_front[1];
  end

  task automatic rd_reg(bit b, logic [1:0] a, output logic [31:0] v);
    @(negedge clk_dx); reg_sel_b = b; reg_addr = a; #1 v = reg_rdata;
  endtask

  logic [31:0] v;
  longint t0, t1;
  int hf_seen;
  initial begin
    repeat (5) @(posedge clk_dx);
    rst_n = 1;
    repeat (5) @(posedge clk_dx);
    // ---- phase 1: unthrottled, timed: one event must fit a 10 us L1 period
    push(i_simple(4'b0101, 2'b11, 0));              // reset front counters
    push(i_wcmd(2'b11, 8'd1)); push(c_word(4'b0101, 0)); // reset back counters
    n_instr_words = 0;
    t0 = $time;
    send_event(0, 1'b1);
    check(n_instr_words == 12, $sformatf("instruction words per event %0d, expected 12", n_instr_words));
    wait (dg_got == 24);
    t1 = $time;
    $display("event 0: %0d ns from first instruction to last DG word", t1 - t0);
    check((t1 - t0) < 10000, "one event within the 10 us period of a 100 kHz L1 rate");
    check(dg_words == 24, "24 DG words per event");
    // ---- phase 2: throttled sources, sinks and link
    throttle = 1;
    for (int ev = 1; ev < NEV; ev++) send_event(ev, ev[0]);
    // counters: per half and event, front moves 5*SPU_LEN + RPU_LEN (+2 leader/trailer)
    push(i_simple(4'b0111, 2'b11, 16'(NEV * (5 * SPU_LEN + RPU_LEN + 2))));
    push(i_simple(4'b0110, 2'b11, 0));              // capture front counters
    push(i_simple(4'b0100, 2'b11, 0));              // notify front
    push(i_simple(4'b0111, 2'b10, 16'hBEEF));       // wrong verify on A only
    // back: data words per half and event = RPU_LEN + 2
    push(i_wcmd(2'b11, 8'd3));
    push(c_word(4'b0111, 16'(NEV * (RPU_LEN + 2))));
    push(c_word(4'b0110, 0));
    push(c_word(4'b0100, 0));
    wait (exp_dg.size() == 0);
    throttle = 0;
    repeat (50) @(posedge clk_dx);
    check(dg_got == 24 * NEV && dg_bad == 0, $sformatf("DG stream: %0d words, %0d wrong", dg_got, dg_bad));
    for (int h = 0; h < 2; h++) begin
      check(rxc[h][5] == NEV * 5 * SPU_LEN, $sformatf("RPU %0d received %0d words", h, rxc[h][5]));
      check(rxc[h][0] == 0, "SPU received nothing");
      check(eoec[h] == NEV, $sformatf("end-of-event marks half %0d: %0d", h, eoec[h]));
    end
    // RPU A received sum of SPU words
    begin
      longint s = 0;
      for (int ev = 0; ev < NEV; ev++) for (int d = 0; d < 5; d++) for (int i = 0; i < SPU_LEN; i++)
        s += longint'(dpu_word(0, d, ev, i));
      check(rxs[0][5] == s, "RPU A received the SPU words");
    end
    // host FIFO readback
    hf_seen = 0;
    while (!hf_empty) begin
      @(negedge clk_host);
      check(exp_hf.size() > 0 && hf_rdata == exp_hf[0], $sformatf("host FIFO word %h", hf_rdata));
      if (exp_hf.size()) void'(exp_hf.pop_front());
      hf_rd = 1; @(negedge clk_host); hf_rd = 0;
      hf_seen++;
      repeat (3) @(negedge clk_host);
    end
    check(exp_hf.size() == 0 && hf_seen == 2 * RPU_LEN * (1 + NEV / 2), $sformatf("host FIFO words %0d", hf_seen));
    // registers
    rd_reg(0, 2'd1, v); check(v[0] == 1'b1, "A front verify error set by wrong V");
    check(v[1] == 1'b0, "A back verify ok");
    rd_reg(1, 2'd1, v); check(v[1:0] == 2'b00, "B verify flags clear");
    rd_reg(0, 2'd2, v); check(v == NEV * (5 * SPU_LEN + RPU_LEN + 2), $sformatf("A front captured %0d", v));
    rd_reg(1, 2'd3, v); check(v == NEV * (RPU_LEN + 2), $sformatf("B back captured %0d", v));
    check(n_nf == 2 && n_nb == 2, $sformatf("notify pulses front %0d back %0d", n_nf, n_nb));
    check(!owner_b, "bus back with half A");
    // mechanisms
    $display("handovers %0d, front stalls %0d, back waits %0d, back-end full %0d",
             n_handover, n_fstall, n_bstall, n_fullstall);
    check(n_handover == 2 * NEV, "two bus handovers per event");
    check(n_fstall > 0, "front end stalled on a full tag+data FIFO");
    check(n_bstall > 0, "back end waited for the DX internal bus");
    check(n_fullstall > 0, "DX internal bus held by a full back-end FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
