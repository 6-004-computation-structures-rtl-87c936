// wd_mux: register-file write-data select (WDSEL).
//
// A 3-input 32-bit multiplexer: 0 = PC+4 (with the supervisor bit, saved by
// branches, JMP and traps), 1 = ALU result, 2 = memory read data (LD, LDR).
// The input numbering follows the lab's block diagram; WDSEL = 3 is unused and
// selects the ALU result in this design. Purely combinational.
module wd_mux
  import beta_pkg::*;
(
  input  wdsel_e      wdsel,
  input  logic [31:0] pc_plus4,
  input  logic [31:0] alu,
  input  logic [31:0] mrd,
  output logic [31:0] wd
);

  always_comb begin
    unique case (wdsel)
      WDSEL_PC4: wd = pc_plus4;
      WDSEL_MEM: wd = mrd;
      default:   wd = alu;
    endcase
  end

endmodule
