// pc_unit: program counter, PC+4 incrementer and next-PC selection.
//
// The PC register holds the address of the instruction being executed. Each
// clock edge it loads one of five candidates chosen by PCSEL:
//   0  PC+4              bit 31 kept from the current PC
//   1  branch target     bit 31 kept from the current PC
//   2  JT (JMP target)   supervisor logic is already applied by operand_sel
//   3  0x80000004        illegal-instruction trap
//   4  0x80000008        interrupt
// A synchronous reset loads 0x80000000, so execution starts in supervisor
// mode. Bit 31 of the PC is the supervisor bit: the incrementer only adds
// into bits 30:0, so ordinary sequencing and branches can never change it.
// The two low PC bits are always zero (word-aligned fetch).
//
// The five inputs, the reset address and the rule that bit 31 of the PC+4 and
// branch inputs come from the current PC follow the lab description. Using
// PCSEL values 5..7 as "PC+4" is this design's choice.
//
// Interface: pc is the registered PC (drives the instruction address);
// pc_plus4 is combinational and carries the current supervisor bit, ready to
// be saved in a register by branches, JMP and traps.
module pc_unit
  import beta_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  pcsel_e      pcsel,
  input  logic [31:0] br_target,  // PC+4+4*SEXT(C); bit 31 ignored here
  input  logic [31:0] jt,         // JMP target with supervisor logic applied
  output logic [31:0] pc,
  output logic [31:0] pc_plus4
);

  logic [31:2] pc_q;
  logic [31:0] next_pc;

  assign pc = {pc_q, 2'b00};

  // Carry out of bit 30 is dropped: the supervisor bit is not part of the sum.
  assign pc_plus4 = {pc_q[31], pc[30:0] + 31'd4};

  always_comb begin
    unique case (pcsel)
      PCSEL_INC:   next_pc = pc_plus4;
      PCSEL_BR:    next_pc = {pc_q[31], br_target[30:0]};
      PCSEL_JT:    next_pc = jt;
      PCSEL_ILLOP: next_pc = ILLOP_ADDR;
      PCSEL_XADR:  next_pc = XADR_ADDR;
      default:     next_pc = pc_plus4;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) pc_q <= RESET_ADDR[31:2];
    else       pc_q <= next_pc[31:2];
  end

endmodule
