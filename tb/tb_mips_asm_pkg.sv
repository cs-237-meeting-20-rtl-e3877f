// tb_mips_asm_pkg: helpers for the processor testbenches.
// Encodes the instructions of the supported subset as 32-bit words (standard
// MIPS encodings) so test programs can be written as function calls. lw/sw
// take (data register rt, byte offset, base register rs); beq takes its
// offset in instructions relative to the following instruction.
package tb_mips_asm_pkg;

  function automatic logic [31:0] r_type(input logic [5:0] fn, input int rd, input int rs, input int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction

  function automatic logic [31:0] i_add(input int rd, input int rs, input int rt); return r_type(6'h20, rd, rs, rt); endfunction
  function automatic logic [31:0] i_sub(input int rd, input int rs, input int rt); return r_type(6'h22, rd, rs, rt); endfunction
  function automatic logic [31:0] i_and(input int rd, input int rs, input int rt); return r_type(6'h24, rd, rs, rt); endfunction
  function automatic logic [31:0] i_or (input int rd, input int rs, input int rt); return r_type(6'h25, rd, rs, rt); endfunction
  function automatic logic [31:0] i_slt(input int rd, input int rs, input int rt); return r_type(6'h2A, rd, rs, rt); endfunction

  function automatic logic [31:0] i_lw(input int rt, input int off, input int rs);
    return {6'h23, 5'(rs), 5'(rt), 16'(off)};
  endfunction
  function automatic logic [31:0] i_sw(input int rt, input int off, input int rs);
    return {6'h2B, 5'(rs), 5'(rt), 16'(off)};
  endfunction
  function automatic logic [31:0] i_beq(input int rs, input int rt, input int off);
    return {6'h04, 5'(rs), 5'(rt), 16'(off)};
  endfunction

endpackage
