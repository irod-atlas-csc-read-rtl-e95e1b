// tb_irod_top: the whole ROD logic at its default sizes, end to end.
//
// 1. Power: the crate controller sets PED; the switches for the DSP supplies
//    come on during the one-second one-shot, the 2.5 V supply once both DSP
//    supplies are good (supply_model stands in for the switches, converters
//    and supervisors).
// 2. Clocks: with the logic held in reset the host moves DX_CLK from its
//    synthesizer to TCLK (backplane TTC clock) over BDG; DX_CLK must then
//    follow BP_TCLK.
// 3. Data Exchange: CSC events with the 12-word instruction stream per
//    event; the DG stream (24 words per event) and the Host FIFO copies are
//    checked word by word. With the S-Link held off long enough the back end
//    fills and the DX internal bus stalls; with throttled DPUs the front end
//    stalls; half B waits for the bus; a wrong verify sets an error flag.
// 4. VME: host block transfer through the VME FIFO and DPRAM traffic both
//    ways.
// Each mechanism is counted and must have happened.
`timescale 1ns/1ps
module tb_irod_top;
  import tb_dx_pkg::*;
  localparam int SPU_LEN = 4, RPU_LEN = 10;

  logic bp_rclk = 0, fp_rclk = 0, bp_tclk = 0, fp_tclk = 0, osc = 0;
  logic s_rclk = 0, s_sclk = 0, s_tclk = 0, s_dclk = 0, s_dc_clk = 0, s_dx_clk = 0;
  logic s_hpu_clk = 0, s_dpu_clk = 0, s_dxint_clk = 0, s_vme_clk = 0;
  always #12.5 bp_tclk = ~bp_tclk;     // 40 MHz TTC clock
  always #12   bp_rclk = ~bp_rclk;
  always #10   osc = ~osc;             // 50 MHz oscillator -> HPU_CLK
  always #11   s_dx_clk = ~s_dx_clk;
  always #8    s_dxint_clk = ~s_dxint_clk;
  always #12.5 s_dclk = ~s_dclk;
  always #10   s_vme_clk = ~s_vme_clk;
  always #9    s_dpu_clk = ~s_dpu_clk;
  logic rclk, sclk, tclk, dclk, dc_clk, hpu_clk, dpu_clk, vme_clk;
  logic rst_n = 1, por_n = 1;
  initial #1 {rst_n, por_n} = 2'b00;   // a falling edge, so the asynchronous resets act at once
  logic bdg_wr = 0; logic [2:0] bdg_addr = 0; logic [3:0] bdg_wdata = 0, bdg_rdata;
  logic instr_valid = 0, instr_ready; logic [31:0] instr_data = 0;
  logic dx_reg_sel_b = 0, dx_reg_wr = 0; logic [1:0] dx_reg_addr = 0;
  logic [31:0] dx_reg_wdata = 0, dx_reg_rdata;
  logic [1:0] notify_front, notify_back;
  logic [1:0][5:0] src_req, dst_wr;
  logic [1:0] rvalid, rlast, wready, eoe, sch, dch;
  logic [1:0][31:0] rdata, wdata;
  logic hf_rd = 0, hf_empty; logic [31:0] hf_rdata;
  logic [32:0] dg_data; logic dg_valid, dg_ready = 1; logic [31:0] dg_words;
  logic owner_b, handover, full_stall; logic [1:0] fstall, bstall;
  logic vf_wr = 0, vf_full, vf_rd = 0, vf_empty; logic [31:0] vf_wdata = 0, vf_rdata;
  logic dp_we_v = 0, dp_we_h = 0; logic [13:0] dp_addr_v = 0, dp_addr_h = 0;
  logic [31:0] dp_wdata_v = 0, dp_wdata_h = 0, dp_rdata_v, dp_rdata_h;
  logic ped_wr = 0, ped_wdata = 0, sysreset_n = 1;
  logic mbpwrok, vaok, vbok, vcok, pena, penb, penc, mbreset_n;
  logic [5:0] pwr_status;

  irod_top dut (
    .bp_rclk, .fp_rclk, .bp_tclk, .fp_tclk, .osc,
    .s_rclk, .s_sclk, .s_tclk, .s_dclk, .s_dc_clk, .s_dx_clk,
    .s_hpu_clk, .s_dpu_clk, .s_dxint_clk, .s_vme_clk,
    .rclk, .sclk, .tclk, .dclk, .dc_clk, .hpu_clk, .dpu_clk, .vme_clk, .rst_n,
    .bdg_wr, .bdg_addr, .bdg_wdata, .bdg_rdata,
    .instr_valid, .instr_data, .instr_ready, .dx_reg_sel_b, .dx_reg_wr, .dx_reg_addr,
    .dx_reg_wdata, .dx_reg_rdata, .notify_front, .notify_back,
    .dxd_src_req(src_req), .dxd_rvalid(rvalid), .dxd_rlast(rlast), .dxd_rdata(rdata),
    .dxd_dst_wr(dst_wr), .dxd_wdata(wdata), .dxd_wready(wready), .dxd_eoe(eoe),
    .dxd_sch(sch), .dxd_dch(dch),
    .hf_rd, .hf_rdata, .hf_empty, .dg_data, .dg_valid, .dg_ready, .dg_words,
    .dx_bus_owner_b(owner_b), .dx_bus_handover(handover), .dx_front_stall(fstall),
    .dx_back_stall(bstall), .dx_bus_full_stall(full_stall),
    .vf_wr, .vf_wdata, .vf_full, .vf_rd, .vf_rdata, .vf_empty,
    .dp_we_v, .dp_addr_v, .dp_wdata_v, .dp_rdata_v, .dp_we_h, .dp_addr_h, .dp_wdata_h, .dp_rdata_h,
    .por_n, .ped_wr, .ped_wdata, .mbpwrok, .vaok, .vbok, .vcok, .sysreset_n,
    .pena, .penb, .penc, .mbreset_n, .pwr_status);

  supply_model #(.RISE(20)) u_sup (.clk(osc), .pena, .penb, .penc, .mbpwrok, .vaok, .vbok, .vcok);

  logic throttle = 0;
  int len [6] = '{SPU_LEN, SPU_LEN, SPU_LEN, SPU_LEN, SPU_LEN, RPU_LEN};
  int rxc [2][6]; longint rxs [2][6]; int eoec [2];
  for (genvar h = 0; h < 2; h++) begin : g_dpu
    dxd_model #(.HALF(h)) u_m (
      .clk(dut.dx_clk), .rst_n, .throttle, .len, .src_req(src_req[h]), .rvalid(rvalid[h]),
      .rlast(rlast[h]), .rdata(rdata[h]), .dst_wr(dst_wr[h]), .wdata(wdata[h]),
      .wready(wready[h]), .rx_count(rxc[h]), .rx_sum(rxs[h]), .eoe_count(eoec[h]), .eoe(eoe[h]));
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- DX stimulus ----------------
  logic [32:0] exp_dg [$];
  logic [31:0] exp_hf [$];
  task automatic push(logic [31:0] w);
    @(negedge dut.dx_clk); instr_valid = 1; instr_data = w; #1;
    while (!instr_ready) begin @(negedge dut.dx_clk); #1; end
    @(posedge dut.dx_clk); #1 instr_valid = 0;
  endtask
  function automatic logic [31:0] leader(int ev, int i);  return 32'hEE00_0000 | (ev << 8) | i; endfunction
  function automatic logic [31:0] trailer(int ev, int i); return 32'hDD00_0000 | (ev << 8) | i; endfunction
  task automatic send_event(int ev, bit to_host);
    push(i_run(4'h0, 2'b11, 1, 0, 0, 0, 6'b100000, 6'b011111));
    push(i_wdata(tag_data(1, 1, 0), 2'b10, 0, 1, 6'b0, 8'd2));
    push(leader(ev, 0)); push(leader(ev, 1));
    push(i_run(tag_data(0, 1, to_host), 2'b11, 0, 0, 0, 1, 6'b0, 6'b100000));
    push(i_wcmd(2'b10, 8'd1)); push(c_word(4'b0011, 16'h0));
    push(i_wdata(tag_data(1, 1, 0), 2'b01, 0, 1, 6'b0, 8'd2));
    push(trailer(ev, 0)); push(trailer(ev, 1));
    push(i_wcmd(2'b01, 8'd1)); push(c_word(4'b0011, 16'h0));
    exp_dg.push_back({1'b1, leader(ev, 0)}); exp_dg.push_back({1'b1, leader(ev, 1)});
    for (int h = 0; h < 2; h++)
      for (int i = 0; i < RPU_LEN; i++) begin
        exp_dg.push_back({1'b0, dpu_word(h, 5, ev, i)});
        if (to_host) exp_hf.push_back(dpu_word(h, 5, ev, i));
      end
    exp_dg.push_back({1'b1, trailer(ev, 0)}); exp_dg.push_back({1'b1, trailer(ev, 1)});
  endtask

  int dg_got = 0, dg_bad = 0;
  bit link_off = 0;
  always @(posedge dclk) begin
    if (rst_n && dg_valid && dg_ready) begin
      dg_got++;
      if (exp_dg.size() == 0 || dg_data != exp_dg[0]) dg_bad++;
      if (exp_dg.size()) void'(exp_dg.pop_front());
    end
    dg_ready <= link_off ? 1'b0 : (throttle ? $urandom_range(0, 1) == 1 : 1'b1);
  end
  int n_handover = 0, n_fstall = 0, n_bstall = 0, n_fullstall = 0, n_nf = 0, n_nb = 0;
  always @(posedge dut.dxint_clk) if (rst_n) begin
    n_handover += handover; n_bstall += (bstall != 0); n_fullstall += full_stall;
    n_nb += notify_back[0] + notify_back[1];
  end
  always @(posedge dut.dx_clk) if (rst_n) begin
    n_fstall += (fstall != 0); n_nf += notify_front[0] + notify_front[1];
  end

  // ---------------- helpers ----------------
  task automatic bdg_write(logic [2:0] a, logic [3:0] d);
    @(negedge hpu_clk); bdg_wr = 1; bdg_addr = a; bdg_wdata = d; @(posedge hpu_clk); #1 bdg_wr = 0;
  endtask
  task automatic ped_write(bit v);
    @(negedge osc); ped_wr = 1; ped_wdata = v; @(posedge osc); #1 ped_wr = 0;
  endtask

  int n_pwr_seq = 0, n_clk_switch = 0, n_vme = 0, edges_dx = 0, edges_tclk = 0;
  always @(posedge dut.dx_clk) edges_dx++;
  always @(posedge bp_tclk) edges_tclk++;
  logic [31:0] v, vq [$];
  int nev, hf_seen;
  initial begin
    // ---- power ----
    repeat (3) @(posedge osc); por_n = 1;
    repeat (30) @(posedge osc);
    check(mbpwrok && !pena && !penc && !penb, "supplies off before PED");
    ped_write(1);
    repeat (10) @(posedge osc);
    check(pena && penc && !penb && pwr_status[5], "DSP supplies switched on during ONE_O");
    repeat (60) @(posedge osc);
    check(vaok && vcok && penb && vbok, "VB on once VAOK and VCOK");
    n_pwr_seq++;
    // ---- clocks: DX_CLK from synthesizer to TCLK (BP_TCLK), logic in reset ----
    bdg_write(3'd5, 4'd2);
    bdg_write(3'd5, 4'd2);
    @(negedge hpu_clk); bdg_addr = 3'd5; #1 check(bdg_rdata == 4'd2, "DX_CLK select read back");
    repeat (5) @(posedge bp_tclk);
    edges_dx = 0; edges_tclk = 0;
    repeat (100) @(posedge bp_tclk);
    check(edges_dx == edges_tclk, $sformatf("DX_CLK follows TCLK: %0d/%0d edges", edges_dx, edges_tclk));
    n_clk_switch++;
    rst_n = 1;
    repeat (5) @(posedge dut.dx_clk);
    // ---- DX, phase 1: one event, unthrottled ----
    nev = 0;
    send_event(nev++, 1);
    wait (dg_got == 24);
    check(dg_words == 24 && dg_bad == 0, "first event on DG");
    // ---- phase 2: link off until the back end is full, then throttled ----
    link_off = 1;
    throttle = 1;
    while (n_fullstall == 0 && nev < 200) send_event(nev++, nev[0]);
    repeat (20) @(posedge dut.dx_clk);
    link_off = 0;
    for (int i = 0; i < 5; i++) send_event(nev++, nev[0]);
    push(i_simple(4'b0111, 2'b10, 16'hBAD0));       // wrong verify on A
    push(i_wcmd(2'b11, 8'd2)); push(c_word(4'b0110, 0)); push(c_word(4'b0100, 0));
    push(i_simple(4'b0100, 2'b11, 0));
    wait (exp_dg.size() == 0);
    throttle = 0;
    repeat (50) @(posedge dut.dx_clk);
    check(dg_got == 24 * nev && dg_bad == 0, $sformatf("DG stream %0d words for %0d events, %0d wrong", dg_got, nev, dg_bad));
    for (int h = 0; h < 2; h++)
      check(rxc[h][5] == nev * 5 * SPU_LEN && eoec[h] == nev, "RPU inputs and end-of-event marks");
    hf_seen = 0;
    while (!hf_empty) begin
      @(negedge hpu_clk);
      check(exp_hf.size() > 0 && hf_rdata == exp_hf[0], "host FIFO word");
      if (exp_hf.size()) void'(exp_hf.pop_front());
      hf_rd = 1; @(negedge hpu_clk); hf_rd = 0; hf_seen++;
      repeat (3) @(negedge hpu_clk);
    end
    check(exp_hf.size() == 0 && hf_seen > 0, $sformatf("host FIFO readback %0d words", hf_seen));
    @(negedge dut.dx_clk); dx_reg_sel_b = 0; dx_reg_addr = 2'd1; #1 v = dx_reg_rdata;
    check(v[0] == 1'b1, "verify mismatch flagged");
    @(negedge dut.dx_clk); dx_reg_sel_b = 1; dx_reg_addr = 2'd3; #1 v = dx_reg_rdata;
    check(v == nev * (RPU_LEN + 2), $sformatf("B back counter captured %0d", v));
    check(n_nf == 2 && n_nb == 2, "notify pulses");
    // ---- VME FIFO and DPRAM ----
    for (int i = 0; i < 100; i++) begin
      @(negedge hpu_clk); vf_wr = 1; vf_wdata = $urandom; vq.push_back(vf_wdata);
      dp_we_h = 1; dp_addr_h = 14'(i); dp_wdata_h = ~vf_wdata;
      @(posedge hpu_clk); #1 vf_wr = 0; dp_we_h = 0;
    end
    repeat (10) @(posedge vme_clk);
    for (int i = 0; i < 100; i++) begin
      @(negedge vme_clk);
      check(!vf_empty && vf_rdata == vq[0], "VME FIFO word");
      dp_addr_v = 14'(i); vf_rd = 1;
      @(posedge vme_clk); #1 vf_rd = 0;
      check(dp_rdata_v == ~vq[0], "DPRAM word written by host read by VME");
      void'(vq.pop_front());
    end
    n_vme++;
    // ---- mechanisms ----
    $display("events %0d: handovers %0d, front stalls %0d, back waits %0d, back-end full %0d",
             nev, n_handover, n_fstall, n_bstall, n_fullstall);
    check(n_pwr_seq > 0, "power sequence happened");
    check(n_clk_switch > 0, "clock switch happened");
    check(n_handover == 2 * nev, "bus handover twice per event");
    check(n_fstall > 0, "front-end stall happened");
    check(n_bstall > 0, "back end waited for the bus");
    check(n_fullstall > 0, "back-end full stall happened");
    check(n_vme > 0, "VME paths used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #5ms; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
