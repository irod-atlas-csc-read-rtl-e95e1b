// tb_dx_pkg: helpers that build DX instruction and command words for the
// testbenches, independently of the RTL's struct definitions (plain bit
// positions as given by the instruction format).
package tb_dx_pkg;
  // tag nibble: {1, C, F_rol, F_host} for data, 0000 for commands
  function automatic logic [3:0] tag_data(bit c, bit rol, bit host);
    return {1'b1, c, rol, host};
  endfunction
  // ab: {A, B}
  function automatic logic [31:0] i_run(logic [3:0] tag, logic [1:0] ab, bit e, bit dch, bit sch,
                                        bit dfifo, logic [5:0] dst, logic [5:0] src);
    return {tag, 4'b0001, ab, 2'b00, e, dch, sch, dfifo, 2'b00, dst, 2'b00, src};
  endfunction
  function automatic logic [31:0] i_wdata(logic [3:0] tag, logic [1:0] ab, bit e, bit dfifo,
                                          logic [5:0] dst, logic [7:0] n);
    return {tag, 4'b0010, ab, 2'b00, e, 1'b0, 1'b0, dfifo, 2'b00, dst, n};
  endfunction
  function automatic logic [31:0] i_wcmd(logic [1:0] ab, logic [7:0] n);
    return {4'b0000, 4'b0011, ab, 2'b00, 12'h000, n};
  endfunction
  function automatic logic [31:0] i_simple(logic [3:0] op, logic [1:0] ab, logic [15:0] v);
    return {4'b0000, op, ab, 2'b00, 4'h0, v};
  endfunction
  function automatic logic [31:0] c_word(logic [3:0] cmd, logic [15:0] v);
    return {cmd, 12'h000, v};
  endfunction
  // pattern word a DPU model sends: half, dpu, event, index
  function automatic logic [31:0] dpu_word(int half, int dpu, int ev, int idx);
    return {4'(half), 4'(dpu), 8'(ev), 16'(idx)};
  endfunction
endpackage
