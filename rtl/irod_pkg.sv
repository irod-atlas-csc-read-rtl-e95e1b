// irod_pkg: types and constants shared by the Data Exchange (DX) blocks.
//
// A DX instruction is one 32-bit word written by the host over the host data
// bus. Its top nibble is the 4-bit tag that accompanies data words into the
// front FPGA's tag+data FIFO (1CFF for data, 0000 for commands); the lower
// 28 bits hold the opcode, the A/B half targets and the operand fields. The
// field positions follow the instruction table of the design; which of the
// two F bits is the ROL FIFO enable and which the Host FIFO enable is this
// design's choice (bit 1 = ROL, bit 0 = Host).
package irod_pkg;

  localparam int unsigned DATA_W  = 32;   // DXD, BDH and DX internal bus width
  localparam int unsigned NUM_DPU = 6;    // DPUs per DX half (A0..A5, B0..B5)

  // Opcodes of DX instructions (host -> DXF FPGA)
  typedef enum logic [3:0] {
    OP_NULL          = 4'b0000,
    OP_RUN_FRONT     = 4'b0001,
    OP_WRITE_DATA    = 4'b0010,
    OP_WRITE_CMD     = 4'b0011,
    OP_NOTIFY_FRONT  = 4'b0100,
    OP_RESET_FRONT   = 4'b0101,
    OP_CAPTURE_FRONT = 4'b0110,
    OP_VERIFY_FRONT  = 4'b0111
  } dx_op_e;

  // Opcodes of DX commands (queued in the data FIFO with tag 0000)
  typedef enum logic [3:0] {
    CMD_NOP          = 4'b0000,
    CMD_RELEASE_BUS  = 4'b0011,
    CMD_NOTIFY_BACK  = 4'b0100,
    CMD_RESET_BACK   = 4'b0101,
    CMD_CAPTURE_BACK = 4'b0110,
    CMD_VERIFY_BACK  = 4'b0111
  } dx_cmd_e;

  // Tag of a tag+data FIFO entry: 1CFF for data, 0000 for a command
  typedef struct packed {
    logic is_data;   // 1 = data word, 0 = DX command word
    logic c;         // control bit sent with the data to the back end
    logic f_rol;     // ROL (read-out link, DXB) FIFO enable
    logic f_host;    // Host FIFO enable
  } dx_tag_t;

  // DX instruction word
  typedef struct packed {
    dx_tag_t    tag;      // [31:28]
    logic [3:0] op;       // [27:24]
    logic       tgt_a;    // [23]  A
    logic       tgt_b;    // [22]  B
    logic [1:0] rsv0;     // [21:20]
    logic       e;        // [19]  end of event flag
    logic       dch;      // [18]  D: DMA channel for destination
    logic       sch;      // [17]  S: DMA channel for source
    logic       d_fifo;   // [16]  leftmost d: the DXF's own data FIFO
    logic [1:0] rsv1;     // [15:14]
    logic [5:0] dst;      // [13:8] destination DPUs
    logic [1:0] rsv2;     // [7:6]
    logic [5:0] src;      // [5:0] source DPUs
  } dx_instr_t;

  // Entry of the tag+data FIFO
  typedef struct packed {
    dx_tag_t             tag;
    logic [DATA_W-1:0]   data;
  } dx_entry_t;

  // One word on the DX internal bus (32 data bits, 33rd bit = control flag,
  // plus the destination FIFO enables that travel with it)
  typedef struct packed {
    logic              valid;
    logic              ctrl;
    logic              rol_en;
    logic              host_en;
    logic [DATA_W-1:0] data;
  } dx_bus_t;

  // Clock multiplexer selects held by the clock setup PLD
  typedef struct packed {
    logic [2:0] rclk;    // 0 BP_RCLK, 1 FP_RCLK, 2 SCLK, 3 TCLK, 4 synthesizer
    logic [1:0] sclk;    // 0 RCLK, 1 TCLK, 2 synthesizer
    logic [2:0] tclk;    // 0 BP_TCLK, 1 FP_TCLK, 2 RCLK, 3 SCLK, 4 synthesizer
    logic [1:0] dclk;    // 0 RCLK, 1 SCLK, 2 TCLK, 3 synthesizer
    logic [1:0] dc_clk;  // same inputs as dclk
    logic [1:0] dx_clk;  // same inputs as dclk
    logic       hpu_clk; // 0 oscillator, 1 synthesizer
  } clk_sel_t;

  localparam clk_sel_t CLK_SEL_RESET = '{rclk: 3'd0, sclk: 2'd1, tclk: 3'd0,
                                         dclk: 2'd3, dc_clk: 2'd3, dx_clk: 2'd3,
                                         hpu_clk: 1'b0};

  // N (word count) and V (compare value) fields of an instruction/command
  function automatic logic [7:0] word_count(logic [31:0] w);
    return w[7:0];
  endfunction

  function automatic logic [15:0] cmp_value(logic [31:0] w);
    return w[15:0];
  endfunction

  // Instructions that are followed by N words in the instruction stream
  function automatic logic has_payload(logic [3:0] op);
    return (op == OP_WRITE_DATA) || (op == OP_WRITE_CMD);
  endfunction

endpackage
