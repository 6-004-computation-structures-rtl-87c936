// control: the Beta's instruction decoder and exception logic.
//
// Combinational. From the opcode (instruction bits 31:26), the Z flag, the
// IRQ input, the supervisor bit PC31 and reset it produces every select and
// enable of the datapath:
//   PCSEL   0 PC+4, 1 branch target, 2 JT, 3 illegal-op trap, 4 interrupt
//   RA2SEL  1 reads Rc on the second port (ST stores Reg[Rc])
//   ASEL    1 puts the branch-target address on ALU input A (LDR)
//   BSEL    1 puts SEXT(C) on ALU input B (the ...C forms, LD, ST)
//   WDSEL   0 PC+4, 1 ALU, 2 memory
//   ALUFN   ALU operation
//   WR      memory write enable;   MOE  memory read output enable
//   WERF    register-file write enable;   WASEL  1 writes XP instead of Rc
// BEQ/BNE turn Z into PCSEL 1 or 0. An opcode outside the implemented set
// forces PCSEL 3, WASEL 1, WERF 1, WDSEL 0 so PC+4 lands in XP. IRQ in user
// mode (PC31 = 0) overrides everything with PCSEL 4, WASEL 1, WERF 1, WDSEL 0,
// WR 0; in supervisor mode IRQ is ignored. Reset forces WR 0.
//
// The signal set, the trap and interrupt overrides and the reset rule follow
// the lab description. Also forcing WERF and MOE low during reset and during
// an interrupt (MOE only), and decoding MUL/DIV only when MULDIV = 1, are this
// design's choices.
module control
  import beta_pkg::*;
#(
  parameter bit MULDIV = 1'b0
) (
  input  logic [5:0] opcode,
  input  logic       z,
  input  logic       irq,
  input  logic       pc31,
  input  logic       reset,
  output pcsel_e     pcsel,
  output logic       ra2sel,
  output logic       asel,
  output logic       bsel,
  output wdsel_e     wdsel,
  output alufn_e     alufn,
  output logic       wr,
  output logic       moe,
  output logic       werf,
  output logic       wasel,
  output logic       illop,      // decoded opcode is not implemented
  output logic       irq_taken   // an interrupt is being taken this cycle
);

  logic alu_op_valid;

  // Valid ALU opcodes: 0x20-0x3F with function field 0,1,4,5,6,8,9,A,C,D,E
  // (2 and 3 only with MULDIV).
  always_comb begin
    unique case (opcode[3:0])
      4'h0, 4'h1, 4'h4, 4'h5, 4'h6,
      4'h8, 4'h9, 4'hA, 4'hC, 4'hD, 4'hE: alu_op_valid = 1'b1;
      4'h2, 4'h3:                         alu_op_valid = MULDIV;
      default:                            alu_op_valid = 1'b0;
    endcase
  end

  assign irq_taken = irq & ~pc31 & ~reset;

  always_comb begin
    // Defaults: a harmless no-op that falls through to PC+4.
    pcsel  = PCSEL_INC;
    ra2sel = 1'b0;
    asel   = 1'b0;
    bsel   = 1'b0;
    wdsel  = WDSEL_ALU;
    alufn  = ALU_ADD;
    wr     = 1'b0;
    moe    = 1'b0;
    werf   = 1'b0;
    wasel  = 1'b0;
    illop  = 1'b0;

    if (opcode[5]) begin
      if (alu_op_valid) begin
        // OP (opcode 10xxxx) and OPC (opcode 11xxxx) instructions.
        alufn = alufn_e'(opcode[3:0]);
        bsel  = opcode[4];
        wdsel = WDSEL_ALU;
        werf  = 1'b1;
      end else begin
        illop = 1'b1;
      end
    end else begin
      unique case (opcode)
        OP_LD: begin
          bsel  = 1'b1;
          wdsel = WDSEL_MEM;
          werf  = 1'b1;
          moe   = 1'b1;
        end
        OP_ST: begin
          bsel   = 1'b1;
          ra2sel = 1'b1;
          wr     = 1'b1;
        end
        OP_JMP: begin
          pcsel = PCSEL_JT;
          wdsel = WDSEL_PC4;
          werf  = 1'b1;
        end
        OP_BEQ: begin
          pcsel = z ? PCSEL_BR : PCSEL_INC;
          wdsel = WDSEL_PC4;
          werf  = 1'b1;
        end
        OP_BNE: begin
          pcsel = z ? PCSEL_INC : PCSEL_BR;
          wdsel = WDSEL_PC4;
          werf  = 1'b1;
        end
        OP_LDR: begin
          asel  = 1'b1;
          alufn = ALU_A;
          wdsel = WDSEL_MEM;
          werf  = 1'b1;
          moe   = 1'b1;
        end
        default: illop = 1'b1;
      endcase
    end

    if (illop) begin
      pcsel = PCSEL_ILLOP;
      wasel = 1'b1;
      werf  = 1'b1;
      wdsel = WDSEL_PC4;
      wr    = 1'b0;
      moe   = 1'b0;
    end

    if (irq_taken) begin
      pcsel = PCSEL_XADR;
      wasel = 1'b1;
      werf  = 1'b1;
      wdsel = WDSEL_PC4;
      wr    = 1'b0;
      moe   = 1'b0;
    end

    if (reset) begin
      wr   = 1'b0;
      werf = 1'b0;
      moe  = 1'b0;
    end
  end

endmodule
