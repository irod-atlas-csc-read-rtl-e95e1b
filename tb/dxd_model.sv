// dxd_model: behavioural model of the six DPUs on one DXD bus.
//
// As a source, DPU i answers a grant (src_req[i]) with a block of len[i]
// words dpu_word(HALF, i, event, index), the last one marked rlast, then
// moves to its next event. With throttle set it withholds rvalid and
// wready on random cycles. As a destination it counts the words written to
// each DPU and keeps a running sum of them.
module dxd_model
  import tb_dx_pkg::*;
#(
  parameter int HALF = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        throttle,
  input  int          len [6],
  input  logic [5:0]  src_req,
  output logic        rvalid,
  output logic        rlast,
  output logic [31:0] rdata,
  input  logic [5:0]  dst_wr,
  input  logic [31:0] wdata,
  output logic        wready,
  output int          rx_count [6],
  output longint      rx_sum [6],
  output int          eoe_count,
  input  logic        eoe
);
  int idx [6];
  int ev  [6];
  int sel;
  logic gate_r, gate_w;

  always_comb begin
    sel = 0;
    for (int i = 0; i < 6; i++) if (src_req[i]) sel = i;
  end
  assign rvalid = (src_req != 0) && gate_r;
  assign rdata  = dpu_word(HALF, sel, ev[sel], idx[sel]);
  assign rlast  = (idx[sel] == len[sel] - 1);
  assign wready = gate_w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 6; i++) begin
        idx[i] = 0; ev[i] = 0; rx_count[i] = 0; rx_sum[i] = 0;
      end
      eoe_count <= 0;
      gate_r <= 1'b1;
      gate_w <= 1'b1;
    end else begin
      if (rvalid && src_req[sel]) begin
        if (rlast) begin idx[sel] = 0; ev[sel] = ev[sel] + 1; end
        else idx[sel] = idx[sel] + 1;
      end
      for (int j = 0; j < 6; j++)
        if (dst_wr[j]) begin
          rx_count[j] = rx_count[j] + 1;
          rx_sum[j]   = rx_sum[j] + longint'(wdata);
        end
      if (eoe) eoe_count <= eoe_count + 1;
      gate_r <= throttle ? ($urandom_range(0, 3) != 0) : 1'b1;
      gate_w <= throttle ? ($urandom_range(0, 3) != 0) : 1'b1;
    end
  end
endmodule
