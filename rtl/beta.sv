// beta: a single-cycle implementation of the 32-bit Beta processor.
//
// Every clock cycle one instruction is fetched from the instruction port,
// decoded, executed, and its result written back on the rising edge. The
// datapath is the classic one:
//   pc_unit       PC register, PC+4 and the five-way next-PC select
//   branch_adder  PC+4 + 4*SEXT(C) for branches and LDR
//   regfile       32 registers, R31 = 0; port 2 reads Rb or Rc (RA2SEL)
//   wa_mux        write address Rc or XP (WASEL)
//   operand_sel   ALU operands (ASEL, BSEL), Z flag, JMP target
//   alu           the arithmetic
//   wd_mux        write data PC+4 / ALU / memory (WDSEL)
//   control       decode, illegal-instruction trap, interrupt, reset
//
// Bit 31 of the PC is the supervisor bit. Reset loads PC = 0x80000000; an
// unimplemented opcode saves PC+4 in XP and jumps to 0x80000004; IRQ while in
// user mode (PC31 = 0) aborts the current instruction, saves PC+4 in XP and
// jumps to 0x80000008. Only these three set the supervisor bit; JMP may clear
// it; nothing else changes it. The datapath, the fixed addresses, the
// supervisor rules and the terminal list below follow the lab description.
//
// Interface (memory is external, word-addressed, asynchronous read):
//   ia   instruction address (the PC);  id  instruction word at ia
//   ma   data address (the ALU output); mrd data read at ma while moe = 1
//   wr   write mwd to ma at the next rising edge;  mwd  Reg[Rc] for ST
//   irq  interrupt request, sampled every cycle
//   reset  synchronous, active high, held for at least one rising edge
// Timing: outputs settle combinationally during the cycle; PC, registers
// and memory update on the rising edge. Assertions check that WR and MOE are
// never high together, that WR stays low during reset, and that user mode
// is left only through a trap or an interrupt.
module beta
  import beta_pkg::*;
#(
  parameter bit MULDIV = 1'b0  // 1: implement the optional MUL/DIV instructions
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        irq,
  output logic [31:0] ia,
  input  logic [31:0] id,
  output logic [31:0] ma,
  output logic        moe,
  input  logic [31:0] mrd,
  output logic        wr,
  output logic [31:0] mwd
);

  // Instruction fields.
  logic [5:0]  opcode;
  logic [4:0]  rc, ra, rb;
  logic [15:0] lit;
  assign opcode = id[31:26];
  assign rc     = id[25:21];
  assign ra     = id[20:16];
  assign rb     = id[15:11];
  assign lit    = id[15:0];

  // Control signals.
  pcsel_e pcsel;
  wdsel_e wdsel;
  alufn_e alufn;
  logic   ra2sel, asel, bsel, werf, wasel;

  // Datapath nets.
  logic [31:0] pc, pc_plus4, br_target, jt;
  logic [31:0] rd1, rd2, a, b, alu_y, wd;
  logic [4:0]  wa;
  logic        z;

  pc_unit u_pc (
    .clk, .reset, .pcsel, .br_target, .jt, .pc, .pc_plus4
  );

  branch_adder u_br (
    .pc_plus4, .lit, .target(br_target)
  );

  regfile #(.NREGS(32), .WIDTH(32)) u_rf (
    .clk,
    .ra1(ra), .rd1,
    .ra2(ra2sel ? rc : rb), .rd2,
    .we(werf), .wa, .wd
  );

  wa_mux u_wa (
    .wasel, .rc, .wa
  );

  operand_sel u_ops (
    .asel, .bsel, .rd1, .rd2, .br_target, .lit, .pc31(pc[31]),
    .a, .b, .z, .jt
  );

  alu #(.MULDIV(MULDIV)) u_alu (
    .alufn, .a, .b, .y(alu_y)
  );

  wd_mux u_wd (
    .wdsel, .pc_plus4, .alu(alu_y), .mrd, .wd
  );

  control #(.MULDIV(MULDIV)) u_ctl (
    .opcode, .z, .irq, .pc31(pc[31]), .reset,
    .pcsel, .ra2sel, .asel, .bsel, .wdsel, .alufn,
    .wr, .moe, .werf, .wasel, .illop(), .irq_taken()
  );

  // Memory bus rules: a cycle reads or writes data memory, never both, and
  // nothing is written while reset is asserted.
  a_no_read_and_write: assert property (@(posedge clk) !(wr && moe));
  a_no_write_in_reset: assert property (@(posedge clk) reset |-> !wr);

  // Leaving user mode takes a trap or an interrupt (or reset).
  a_supervisor_entry: assert property (@(posedge clk) disable iff (reset)
    (!pc[31] && !(pcsel inside {PCSEL_ILLOP, PCSEL_XADR})) |=> !pc[31]);

  assign ia  = pc;
  assign ma  = alu_y;
  assign mwd = rd2;

endmodule
