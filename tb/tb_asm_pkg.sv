// tb_asm_pkg: instruction encoders used by the testbenches.
//
// Builds 32-bit instruction words in the processor's fixed formats:
//   bit direct    {p=0, 0, 0, op[5:0], word address[18:0], bit[3:0]}
//   bit indirect  {p=0, 0, 1, op[5:0], 15'b0, Rd[3:0], Rs[3:0]}
//   word mem/jump {p=0, 1, kind[5:0], reg[3:0], address[19:0]}
//   word register {p=0, 1, kind[5:0], Rs[3:0], Rd[3:0], sub-op[15:0]}
package tb_asm_pkg;
  import plc_pkg::*;

  function automatic logic [31:0] bi(bop_e op, logic [18:0] wa, logic [3:0] b);
    return {1'b0, 1'b0, 1'b0, 6'(op), wa, b};
  endfunction

  function automatic logic [31:0] bii(bop_e op, logic [3:0] rd, logic [3:0] rs);
    return {1'b0, 1'b0, 1'b1, 6'(op), 15'h0, rd, rs};
  endfunction

  function automatic logic [31:0] bx(bop_e op);   // no operand
    return {1'b0, 1'b0, 1'b0, 6'(op), 23'h0};
  endfunction

  // word load/store/jump; addr is a byte address for memory operands
  function automatic logic [31:0] wm(wkind_e k, logic [3:0] r, logic [19:0] a);
    return {1'b0, 1'b1, 6'(k), r, a};
  endfunction

  // word register operation: Rd <= Rd op Rs
  function automatic logic [31:0] wr(logic w32, aop_e op, logic [3:0] rd, logic [3:0] rs);
    return {1'b0, 1'b1, w32 ? 6'(W_REG32) : 6'(W_REG16), rs, rd, 11'h0, 5'(op)};
  endfunction
endpackage
