// alu: the Beta's 32-bit arithmetic and logic unit.
//
// Combinational. ALUFN selects one of:
//   ADD, SUB                     two's-complement, no flags
//   CMPEQ, CMPLT, CMPLE          signed compares, result 1 or 0
//   AND, OR, XOR                 bitwise
//   SHL, SHR, SRA                shift A by B[4:0]; SRA copies the sign bit
//   A                            pass operand A (address for LDR)
//   MUL, DIV                     only when MULDIV = 1: low 32 bits of the signed
//                                product; signed quotient truncated toward zero
// The operation set is that of the Beta instruction set. The lab lists MUL and
// DIV as optional and an unimplemented instruction must trap, so by default
// (MULDIV = 0) the control unit treats them as illegal and this unit returns 0
// for them. The ALUFN encoding and the DIV corner cases (divide by zero gives
// all ones, -2^31 / -1 gives -2^31) are this design's choices.
module alu
  import beta_pkg::*;
#(
  parameter bit MULDIV = 1'b0
) (
  input  alufn_e      alufn,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic [31:0] sum, diff, prod, quot;
  logic        eq, lt;

  assign sum  = a + b;
  assign diff = a - b;
  assign eq   = (a == b);
  assign lt   = $signed(a) < $signed(b);

  if (MULDIV) begin : g_muldiv
    assign prod = 32'($signed(a) * $signed(b));
    always_comb begin
      if (b == '0)                                 quot = '1;
      else if (a == 32'h8000_0000 && b == '1)      quot = 32'h8000_0000;
      else                                         quot = 32'($signed(a) / $signed(b));
    end
  end else begin : g_no_muldiv
    assign prod = '0;
    assign quot = '0;
  end

  always_comb begin
    unique case (alufn)
      ALU_ADD:   y = sum;
      ALU_SUB:   y = diff;
      ALU_MUL:   y = prod;
      ALU_DIV:   y = quot;
      ALU_CMPEQ: y = {31'b0, eq};
      ALU_CMPLT: y = {31'b0, lt};
      ALU_CMPLE: y = {31'b0, lt | eq};
      ALU_A:     y = a;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_SHL:   y = a << b[4:0];
      ALU_SHR:   y = a >> b[4:0];
      ALU_SRA:   y = 32'($signed(a) >>> b[4:0]);
      default:   y = sum;
    endcase
  end

endmodule
