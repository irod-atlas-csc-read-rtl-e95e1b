// dxf_back_seq: tag analysis and command analysis of a DXF FPGA (back end).
//
// Reads the tag+data FIFO head (first-word-fall-through) and handles one
// entry per clock:
//   data (tag 1CFF)  driven onto the DX internal bus with C as the 33rd bit
//                    and the two FIFO enables F; it waits until this FPGA
//                    owns the bus (bus_grant) and the back end can take a
//                    word (bus_ready). A data word with both F bits clear
//                    goes nowhere but is still counted. Every data word
//                    counts once on the back-end counter.
//   command (0000)   NOP; release the bus to the other DXF FPGA (waits for
//                    ownership first, so a release never gives away a bus
//                    this FPGA does not hold); notify back (pulse to the host
//                    DSP); reset, capture or verify the back-end counter.
//                    Undefined commands are dropped.
// The wait-for-ownership rule for release is this design's choice.
module dxf_back_seq
  import irod_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      enable,        // control register: drain the FIFO
  input  logic      df_empty,
  input  dx_entry_t df_rdata,
  output logic      df_rd,
  input  logic      bus_grant,
  input  logic      bus_ready,
  output dx_bus_t   bus_out,
  output logic      bus_release,
  output logic      cnt_inc,
  output logic      cnt_clr,
  output logic      cnt_cap,
  output logic      cnt_ver,
  output logic [15:0] cnt_v,
  output logic      notify,
  output logic      stall          // a data word waited for the bus
);
  dx_tag_t  t;
  logic     needs_bus;
  dx_cmd_e  cmd;

  assign t         = df_rdata.tag;
  assign needs_bus = t.f_rol || t.f_host;
  assign cmd       = dx_cmd_e'(df_rdata.data[31:28]);
  assign cnt_v     = cmp_value(df_rdata.data);

  always_comb begin
    df_rd       = 1'b0;
    bus_out     = '{valid: 1'b0, ctrl: t.c, rol_en: t.f_rol, host_en: t.f_host,
                    data: df_rdata.data};
    bus_release = 1'b0;
    cnt_inc     = 1'b0;
    cnt_clr     = 1'b0;
    cnt_cap     = 1'b0;
    cnt_ver     = 1'b0;
    notify      = 1'b0;
    stall       = 1'b0;
    if (enable && !df_empty) begin
      if (t.is_data) begin
        if (!needs_bus) begin
          df_rd   = 1'b1;
          cnt_inc = 1'b1;
        end else if (bus_grant && bus_ready) begin
          bus_out.valid = 1'b1;
          df_rd   = 1'b1;
          cnt_inc = 1'b1;
        end else begin
          stall = 1'b1;
        end
      end else begin
        df_rd = 1'b1;
        case (cmd)
          CMD_RELEASE_BUS: begin
            df_rd       = bus_grant;
            bus_release = bus_grant;
          end
          CMD_NOTIFY_BACK:  notify  = 1'b1;
          CMD_RESET_BACK:   cnt_clr = 1'b1;
          CMD_CAPTURE_BACK: cnt_cap = 1'b1;
          CMD_VERIFY_BACK:  cnt_ver = 1'b1;
          default: ;
        endcase
      end
    end
  end

  a_bus_only_when_granted: assert property (@(posedge clk) disable iff (!rst_n) bus_out.valid |-> bus_grant);
endmodule
