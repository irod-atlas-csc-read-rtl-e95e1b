// dxf_front_seq: instruction analysis of a DXF FPGA (the front end).
//
// Takes DX instructions from the instruction FIFO one at a time and carries
// them out in order:
//   run front sequence   for each source DPU set in s, lowest index first,
//                        read words over the DXD bus until the source marks
//                        its last word; every word goes at the same time to
//                        the destination DPUs set in d and, if the leftmost d
//                        bit is set, into the tag+data FIFO with the
//                        instruction's tag.
//   write N data words   the N words after the instruction go to the
//                        destinations d and/or the tag+data FIFO (tag 1CFF).
//   write N command words the N words after the instruction go into the
//                        tag+data FIFO with tag 0000 (DX commands).
//   notify front         one-cycle pulse to the host DSP.
//   reset/capture/verify the front-end data transfer counter.
//   NULL (and undefined opcodes) do nothing.
// DXD is a shared bus: a source is granted by src_req (one-hot) and drives a
// word with rvalid/rlast; a word moves when src_req and rvalid are both
// high. A word goes out only when every addressed sink can take it
// (dxd_wready for DPUs, !df_full for the FIFO), so a full FIFO stalls the
// source. dxd_eoe marks the last word of an instruction whose E flag is set;
// sch/dch show the DMA channels S and D while the instruction runs. Each
// data word moved counts once on the front counter; command words do not.
// The handshake signals and the counting rule are this design's choices.
// One word per clock at most; an instruction is fetched in one cycle.
module dxf_front_seq
  import irod_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,        // control register: run
  // instruction FIFO
  input  logic              if_empty,
  input  logic [31:0]       if_rdata,
  output logic              if_rd,
  // DXD bus
  output logic [NUM_DPU-1:0] dxd_src_req,
  input  logic              dxd_rvalid,
  input  logic              dxd_rlast,
  input  logic [31:0]       dxd_rdata,
  output logic [NUM_DPU-1:0] dxd_dst_wr,
  output logic [31:0]       dxd_wdata,
  input  logic              dxd_wready,
  output logic              dxd_eoe,
  output logic              dxd_sch,
  output logic              dxd_dch,
  // tag+data FIFO write side
  output logic              df_wr,
  output dx_entry_t         df_wdata,
  input  logic              df_full,
  // front-end counter control
  output logic              cnt_inc,
  output logic              cnt_clr,
  output logic              cnt_cap,
  output logic              cnt_ver,
  output logic [15:0]       cnt_v,
  output logic              notify,
  output logic              busy,
  output logic              stall          // a word was waiting for a full sink
);
  typedef enum logic [1:0] {S_FETCH, S_RUN, S_PAYLOAD} state_e;
  state_e     state;
  dx_instr_t  cur;          // instruction being carried out
  logic [2:0] src_idx;      // current source in a front sequence
  logic [7:0] remain;       // payload words left
  dx_instr_t  nxt;
  logic       sink_ready, more_src;
  logic [2:0] next_src;
  logic       xfer;

  assign nxt = dx_instr_t'(if_rdata);

  // lowest set source bit above src_idx
  always_comb begin
    more_src = 1'b0;
    next_src = '0;
    for (int i = NUM_DPU - 1; i >= 0; i--) begin
      if (cur.src[i] && (i > int'(src_idx))) begin
        more_src = 1'b1;
        next_src = 3'(i);
      end
    end
  end

  function automatic logic [2:0] lowest(logic [NUM_DPU-1:0] m);
    logic [2:0] r;
    r = '0;
    for (int i = NUM_DPU - 1; i >= 0; i--) if (m[i]) r = 3'(i);
    return r;
  endfunction

  assign sink_ready = (!cur.d_fifo || !df_full) && ((cur.dst == '0) || dxd_wready);
  assign busy    = (state != S_FETCH);
  assign dxd_sch = busy && cur.sch;
  assign dxd_dch = busy && cur.dch;

  always_comb begin
    if_rd       = 1'b0;
    dxd_src_req = '0;
    dxd_dst_wr  = '0;
    dxd_wdata   = dxd_rdata;
    dxd_eoe     = 1'b0;
    df_wr       = 1'b0;
    df_wdata    = '{tag: cur.tag, data: dxd_rdata};
    cnt_inc     = 1'b0;
    cnt_clr     = 1'b0;
    cnt_cap     = 1'b0;
    cnt_ver     = 1'b0;
    cnt_v       = cmp_value(if_rdata);
    notify      = 1'b0;
    xfer        = 1'b0;
    stall       = 1'b0;
    unique case (state)
      S_FETCH: begin
        if (enable && !if_empty) begin
          if_rd = 1'b1;
          unique case (nxt.op)
            OP_NOTIFY_FRONT:  notify  = 1'b1;
            OP_RESET_FRONT:   cnt_clr = 1'b1;
            OP_CAPTURE_FRONT: cnt_cap = 1'b1;
            OP_VERIFY_FRONT:  cnt_ver = 1'b1;
            default: ;
          endcase
        end
      end
      S_RUN: begin
        if (sink_ready) dxd_src_req[src_idx] = 1'b1;
        else            stall = 1'b1;
        xfer = sink_ready && dxd_rvalid;
        if (xfer) begin
          dxd_dst_wr = cur.dst;
          df_wr      = cur.d_fifo;
          cnt_inc    = 1'b1;
          dxd_eoe    = cur.e && dxd_rlast && !more_src;
        end
      end
      S_PAYLOAD: begin
        dxd_wdata = if_rdata;
        if (cur.op == OP_WRITE_CMD) begin
          df_wdata = '{tag: '0, data: if_rdata};
          xfer     = !if_empty && !df_full;
          stall    = !if_empty && df_full;
          df_wr    = xfer;
        end else begin
          df_wdata = '{tag: cur.tag, data: if_rdata};
          xfer     = !if_empty && sink_ready;
          stall    = !if_empty && !sink_ready;
          if (xfer) begin
            dxd_dst_wr = cur.dst;
            df_wr      = cur.d_fifo;
            cnt_inc    = 1'b1;
            dxd_eoe    = cur.e && (remain == 8'd1);
          end
        end
        if_rd = xfer;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_FETCH;
      cur     <= '0;
      src_idx <= '0;
      remain  <= '0;
    end else begin
      unique case (state)
        S_FETCH: begin
          if (enable && !if_empty) begin
            cur <= nxt;
            if (nxt.op == OP_RUN_FRONT && nxt.src != '0) begin
              src_idx <= lowest(nxt.src);
              state   <= S_RUN;
            end else if (has_payload(nxt.op) && word_count(if_rdata) != 8'd0) begin
              remain <= word_count(if_rdata);
              state  <= S_PAYLOAD;
            end
          end
        end
        S_RUN: begin
          if (xfer && dxd_rlast) begin
            if (more_src) src_idx <= next_src;
            else          state   <= S_FETCH;
          end
        end
        S_PAYLOAD: begin
          if (xfer) begin
            remain <= remain - 1'b1;
            if (remain == 8'd1) state <= S_FETCH;
          end
        end
        default: state <= S_FETCH;
      endcase
    end
  end

  a_onehot_src: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(dxd_src_req));
  a_no_df_overflow: assert property (@(posedge clk) disable iff (!rst_n) df_wr |-> !df_full);
endmodule
