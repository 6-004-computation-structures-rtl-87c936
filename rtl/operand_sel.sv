// operand_sel: ALU operand selection, Z logic and jump target.
//
// Everything hanging off the RD1/RD2 register-file outputs in front of the ALU:
//   A operand  ASEL = 0: RD1; ASEL = 1: the branch adder's PC+4+4*SEXT(C) with
//              bit 31 forced to 0 (LDR address arithmetic ignores the
//              supervisor bit).
//   B operand  BSEL = 0: RD2; BSEL = 1: SEXT(C), the sign-extended literal.
//   Z          1 when RD1 is zero (a 32-input NOR); used for BEQ/BNE.
//   JT         RD1 with bits 1:0 forced to 0 and bit 31 = PC31 & RD1[31],
//              so JMP can clear the supervisor bit or leave it, never set it.
// The mux numbering, the Z definition and the supervisor rules follow the lab
// description. Purely combinational.
module operand_sel (
  input  logic        asel,
  input  logic        bsel,
  input  logic [31:0] rd1,
  input  logic [31:0] rd2,
  input  logic [31:0] br_target,
  input  logic [15:0] lit,
  input  logic        pc31,
  output logic [31:0] a,
  output logic [31:0] b,
  output logic        z,
  output logic [31:0] jt
);

  assign a  = asel ? {1'b0, br_target[30:0]} : rd1;
  assign b  = bsel ? {{16{lit[15]}}, lit} : rd2;
  assign z  = ~|rd1;
  assign jt = {pc31 & rd1[31], rd1[30:2], 2'b00};

endmodule
