// beta_asm_pkg: instruction encoders for building Beta test programs.
//
// Each function returns one 32-bit instruction word in the Beta's two formats:
//   register form  opcode[31:26] rc[25:21] ra[20:16] rb[15:11] 0[10:0]
//   literal form   opcode[31:26] rc[25:21] ra[20:16] literal[15:0]
// Branch and LDR encoders take byte addresses and compute the word offset
// from PC+4.
package beta_asm_pkg;

  function automatic logic [31:0] enc_op(logic [5:0] op, logic [4:0] ra,
                                         logic [4:0] rb, logic [4:0] rc);
    return {op, rc, ra, rb, 11'b0};
  endfunction

  function automatic logic [31:0] enc_opc(logic [5:0] op, logic [4:0] ra,
                                          logic [15:0] lit, logic [4:0] rc);
    return {op, rc, ra, lit};
  endfunction

  // BEQ/BNE/LDR at byte address pc to byte address target.
  function automatic logic [31:0] enc_br(logic [5:0] op, logic [4:0] ra,
                                         logic [31:0] pc, logic [31:0] target,
                                         logic [4:0] rc);
    logic [31:0] off;
    off = (target - (pc + 32'd4)) >>> 2;
    return {op, rc, ra, off[15:0]};
  endfunction

endpackage
