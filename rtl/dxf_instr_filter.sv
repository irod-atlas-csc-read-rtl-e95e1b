// dxf_instr_filter: instruction filter of a DXF FPGA.
//
// Both DXF FPGAs see the same DX instruction stream on the host data bus.
// Every instruction carries two target bits, A and B. The filter passes an
// instruction, and the N words that follow a "write N data/command words"
// instruction, only if this FPGA's target bit is set; otherwise it drops the
// instruction together with its N words, so that those words are never taken
// for instructions. It tracks the stream with a down counter of payload
// words still to come. The stream is a valid/ready flow that passes through
// without delay; a dropped word is accepted at once.
module dxf_instr_filter
  import irod_pkg::*;
#(
  parameter bit HALF_B = 1'b0      // 0: this is DX half A, 1: half B
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] in_data,
  output logic        in_ready,
  output logic        out_valid,
  output logic [31:0] out_data,
  input  logic        out_ready
);
  logic [7:0] remain;     // payload words still expected
  logic       keep_pl;    // payload belongs to an instruction for this half
  logic       is_instr, targeted, keep;
  dx_instr_t  ins;

  assign ins      = dx_instr_t'(in_data);
  assign is_instr = (remain == 8'd0);
  assign targeted = HALF_B ? ins.tgt_b : ins.tgt_a;
  assign keep     = is_instr ? targeted : keep_pl;

  assign out_valid = in_valid && keep;
  assign out_data  = in_data;
  assign in_ready  = keep ? out_ready : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remain  <= '0;
      keep_pl <= 1'b0;
    end else if (in_valid && in_ready) begin
      if (is_instr) begin
        remain  <= has_payload(ins.op) ? word_count(in_data) : 8'd0;
        keep_pl <= targeted;
      end else begin
        remain  <= remain - 1'b1;
      end
    end
  end
endmodule
