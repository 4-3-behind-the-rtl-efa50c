// trm_asm_pkg: instruction encoders for TRM test programs.
//
// Each function returns one 18-bit instruction in the field layout described
// in trm_pkg. Register-form operations take operand A from rs, immediate
// forms from a 10-bit zero-extended constant. Branch offsets are in
// instructions, relative to the instruction after the branch.
package trm_asm_pkg;
  import trm_pkg::*;

  function automatic logic [17:0] op_r(op_e op, int rd, int rs);
    return {op, 3'(rd), 1'b1, 7'b0, 3'(rs)};
  endfunction
  function automatic logic [17:0] op_i(op_e op, int rd, int imm);
    return {op, 3'(rd), 1'b0, 10'(imm)};
  endfunction
  function automatic logic [17:0] ld(int rd, int rs, int off);
    return {OP_LD, 3'(rd), 1'b0, 7'(off), 3'(rs)};
  endfunction
  function automatic logic [17:0] st(int rd, int rs, int off);
    return {OP_ST, 3'(rd), 1'b0, 7'(off), 3'(rs)};
  endfunction
  function automatic logic [17:0] bc(cond_e c, int off);
    return {OP_BC, c, 10'(off)};
  endfunction
  function automatic logic [17:0] bl(int off);
    return {OP_BL, 14'(off)};
  endfunction
  function automatic logic [17:0] br(int rs);
    return {OP_BR, 3'b0, 1'b1, 1'b0, 6'b0, 3'(rs)};
  endfunction
  function automatic logic [17:0] blr(int rd, int rs);
    return {OP_BR, 3'(rd), 1'b1, 1'b1, 6'b0, 3'(rs)};
  endfunction
  function automatic logic [17:0] ldh(int rd);
    return {OP_MOV, 3'(rd), 1'b1, 6'b0, 1'b1, 3'b0};
  endfunction
  // branch to itself: halts the program
  function automatic logic [17:0] halt();
    return bc(C_AL, -1);
  endfunction
endpackage
