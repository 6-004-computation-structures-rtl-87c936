// beta_pkg: constants and types shared by the Beta processor modules.
//
// Holds the instruction opcodes, the ALU function codes, the next-PC select
// codes and the fixed addresses used for reset, illegal-instruction traps and
// interrupts. The addresses (0x80000000, 0x80000004, 0x80000008) and the XP
// register as the exception link register follow the lab description. The
// opcode numbers follow the standard Beta instruction encoding (6-bit opcode in
// bits 31:26); the ALU function codes are this design's own.
package beta_pkg;

  // Fixed PC values. Bit 31 is the supervisor bit.
  localparam logic [31:0] RESET_ADDR = 32'h8000_0000;
  localparam logic [31:0] ILLOP_ADDR = 32'h8000_0004;
  localparam logic [31:0] XADR_ADDR  = 32'h8000_0008;

  // Register numbers with a fixed role.
  localparam logic [4:0] XP_REG = 5'd30;  // exception/interrupt link register

  // Opcodes, instruction bits 31:26.
  typedef enum logic [5:0] {
    OP_LD     = 6'h18,
    OP_ST     = 6'h19,
    OP_JMP    = 6'h1B,
    OP_BEQ    = 6'h1C,
    OP_BNE    = 6'h1D,
    OP_LDR    = 6'h1F,
    OP_ADD    = 6'h20,
    OP_SUB    = 6'h21,
    OP_MUL    = 6'h22,
    OP_DIV    = 6'h23,
    OP_CMPEQ  = 6'h24,
    OP_CMPLT  = 6'h25,
    OP_CMPLE  = 6'h26,
    OP_AND    = 6'h28,
    OP_OR     = 6'h29,
    OP_XOR    = 6'h2A,
    OP_SHL    = 6'h2C,
    OP_SHR    = 6'h2D,
    OP_SRA    = 6'h2E,
    OP_ADDC   = 6'h30,
    OP_SUBC   = 6'h31,
    OP_MULC   = 6'h32,
    OP_DIVC   = 6'h33,
    OP_CMPEQC = 6'h34,
    OP_CMPLTC = 6'h35,
    OP_CMPLEC = 6'h36,
    OP_ANDC   = 6'h38,
    OP_ORC    = 6'h39,
    OP_XORC   = 6'h3A,
    OP_SHLC   = 6'h3C,
    OP_SHRC   = 6'h3D,
    OP_SRAC   = 6'h3E
  } opcode_e;

  // ALU functions.
  typedef enum logic [3:0] {
    ALU_ADD   = 4'd0,
    ALU_SUB   = 4'd1,
    ALU_MUL   = 4'd2,
    ALU_DIV   = 4'd3,
    ALU_CMPEQ = 4'd4,
    ALU_CMPLT = 4'd5,
    ALU_CMPLE = 4'd6,
    ALU_A     = 4'd7,
    ALU_AND   = 4'd8,
    ALU_OR    = 4'd9,
    ALU_XOR   = 4'd10,
    ALU_SHL   = 4'd12,
    ALU_SHR   = 4'd13,
    ALU_SRA   = 4'd14
  } alufn_e;

  // Next-PC select, numbered as the inputs of the PCSEL mux in the block diagram.
  typedef enum logic [2:0] {
    PCSEL_INC   = 3'd0,  // PC+4
    PCSEL_BR    = 3'd1,  // PC+4+4*SEXT(C)
    PCSEL_JT    = 3'd2,  // Reg[Ra] (JMP)
    PCSEL_ILLOP = 3'd3,  // 0x80000004
    PCSEL_XADR  = 3'd4   // 0x80000008
  } pcsel_e;

  // Register write-data select, numbered as the WDSEL mux inputs.
  typedef enum logic [1:0] {
    WDSEL_PC4 = 2'd0,
    WDSEL_ALU = 2'd1,
    WDSEL_MEM = 2'd2
  } wdsel_e;

endpackage
