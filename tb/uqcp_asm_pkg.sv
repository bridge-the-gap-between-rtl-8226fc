// uqcp_asm_pkg: instruction encoders for the testbenches.
//
// Builds the 32-bit words of the processor's instruction set (layout in
// uqcp_pkg) so that test programs can be written as readable calls such as
// bundle(0, H, 0, 0, 0) or smso(0, 0, 15'b1).
package uqcp_asm_pkg;
  import uqcp_pkg::*;

  function automatic logic [31:0] r3(opcode_e op, int rd, int rs, int rt);
    return {op, 5'(rd), 5'(rs), 5'(rt), 11'd0};
  endfunction
  function automatic logic [31:0] ldi(int rd, int imm);
    return {OP_LDI, 5'(rd), 21'(imm)};
  endfunction
  function automatic logic [31:0] ld(int rd, int rs, int off);
    return {OP_LD, 5'(rd), 5'(rs), 16'(off)};
  endfunction
  function automatic logic [31:0] st(int rd, int rs, int off);
    return {OP_ST, 5'(rd), 5'(rs), 16'(off)};
  endfunction
  function automatic logic [31:0] cmp(int rs, int rt);
    return {OP_CMP, 5'd0, 5'(rs), 5'(rt), 11'd0};
  endfunction
  function automatic logic [31:0] br(flag_e f, int off);
    return {OP_BR, f, 22'(off)};
  endfunction
  function automatic logic [31:0] fbr(flag_e f, int rd);
    return {OP_FBR, 5'(rd), 5'd0, f, 12'd0};
  endfunction
  function automatic logic [31:0] fmr(int rd, int q);
    return {OP_FMR, 5'(rd), 5'd0, 16'(q)};
  endfunction
  function automatic logic [31:0] jmp(int off);
    return {OP_J, 26'(off)};
  endfunction
  function automatic logic [31:0] endi();
    return {OP_END, 26'd0};
  endfunction
  function automatic logic [31:0] qwait(int n);
    return {OP_QWAIT, 6'd0, 20'(n)};
  endfunction
  function automatic logic [31:0] qwaitr(int rs);
    return {OP_QWAITR, 5'd0, 5'(rs), 16'd0};
  endfunction
  function automatic logic [31:0] smso(int sd, int off, int list);
    return {OP_SMSO, 4'(sd), 7'(off), 15'(list)};
  endfunction
  function automatic logic [31:0] smsol(int sd, int off);
    return {OP_SMSOL, 4'(sd), 7'(off), 15'd0};
  endfunction
  function automatic logic [31:0] sito(int td, int off, int src, int tgt);
    return {OP_SITO, 4'(td), 7'(off), 1'b0, 7'(src), 7'(tgt)};
  endfunction
  function automatic logic [31:0] sitol(int td, int off, int n);
    return {OP_SITOL, 4'(td), 7'(off), 3'(n), 12'd0};
  endfunction
  function automatic logic [31:0] qset(int reg5, int bidx, int val);
    return {OP_QSET, 5'(reg5), 7'(bidx), 1'(val), 13'd0};
  endfunction
  // reg: 0..15 = S0..S15, 16..31 = T0..T15
  function automatic logic [31:0] bundle(int pi, int op0, int reg0, int op1, int reg1);
    return {3'b111, 3'(pi), 8'(op0), 5'(reg0), 8'(op1), 5'(reg1)};
  endfunction
  function automatic logic [31:0] simple(opcode_e op);
    return {op, 26'd0};
  endfunction
  function automatic logic [31:0] fhr(int rt);
    return {OP_FHR, 5'd0, 5'd0, 5'(rt), 11'd0};
  endfunction
endpackage
