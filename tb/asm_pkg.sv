// asm_pkg: a small assembler for the testbenches. Each function returns one
// 32-bit instruction word of the processor's instruction set: R-type add,
// sub, and, or, slt; lw, sw, beq, j; and wait (I-format, rs = wait register,
// immediate = count).
package asm_pkg;
  import mips_pkg::*;

  function automatic logic [31:0] r_op(logic [5:0] fn, int rd, int rs, int rt);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] add_(int rd, int rs, int rt); return r_op(FN_ADD, rd, rs, rt); endfunction
  function automatic logic [31:0] sub_(int rd, int rs, int rt); return r_op(FN_SUB, rd, rs, rt); endfunction
  function automatic logic [31:0] and_(int rd, int rs, int rt); return r_op(FN_AND, rd, rs, rt); endfunction
  function automatic logic [31:0] or_ (int rd, int rs, int rt); return r_op(FN_OR,  rd, rs, rt); endfunction
  function automatic logic [31:0] slt_(int rd, int rs, int rt); return r_op(FN_SLT, rd, rs, rt); endfunction
  function automatic logic [31:0] lw_(int rt, int off, int rs);
    return {OP_LW, 5'(rs), 5'(rt), 16'(off)};
  endfunction
  function automatic logic [31:0] sw_(int rt, int off, int rs);
    return {OP_SW, 5'(rs), 5'(rt), 16'(off)};
  endfunction
  // beq at word address pc_word branching to word address target_word
  function automatic logic [31:0] beq_(int rs, int rt, int pc_word, int target_word);
    return {OP_BEQ, 5'(rs), 5'(rt), 16'(target_word - pc_word - 1)};
  endfunction
  function automatic logic [31:0] j_(int target_word);
    return {OP_J, 26'(target_word)};
  endfunction
  function automatic logic [31:0] wait_(int w, int count);
    return {OP_WAIT, 5'(w), 5'd0, 16'(count)};
  endfunction
  function automatic logic [31:0] nop_();
    return add_(0, 0, 0);
  endfunction
endpackage
