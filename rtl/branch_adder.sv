// branch_adder: branch and LDR target address.
//
// Computes PC+4 + 4*SEXT(C), where C is the 16-bit literal in instruction bits
// 15:0. Sign extension and the multiply by 4 are wiring only; one 32-bit adder
// does the work. The full 32-bit sum is produced; the consumers replace bit 31
// (pc_unit with the current supervisor bit for branches, operand_sel with zero
// for LDR address arithmetic), as the lab description requires.
// Purely combinational.
module branch_adder (
  input  logic [31:0] pc_plus4,
  input  logic [15:0] lit,
  output logic [31:0] target
);

  logic [31:0] offset;

  assign offset = {{14{lit[15]}}, lit, 2'b00};
  assign target = pc_plus4 + offset;

endmodule
