// regfile: the Beta's 32 x 32-bit register file.
//
// Two combinational read ports (RA1/RD1 and RA2/RD2) and one write port
// (WA/WD/WE) that writes on the rising clock edge, so a value written by one
// instruction is seen by the next. Register 31 always reads as zero and
// writes to it are discarded. The three ports and their names come from the
// lab's block diagram; the register count, width and the R31 rule come from
// the Beta architecture. Registers are not reset (software initialises them);
// this is this design's choice, since the lab gives no reset state for them.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic [$clog2(NREGS)-1:0] ra1,
  output logic [WIDTH-1:0]         rd1,
  input  logic [$clog2(NREGS)-1:0] ra2,
  output logic [WIDTH-1:0]         rd2,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] wa,
  input  logic [WIDTH-1:0]         wd
);

  localparam logic [$clog2(NREGS)-1:0] ZERO_REG = $clog2(NREGS)'(NREGS - 1);

  logic [WIDTH-1:0] regs [NREGS];

  assign rd1 = (ra1 == ZERO_REG) ? '0 : regs[ra1];
  assign rd2 = (ra2 == ZERO_REG) ? '0 : regs[ra2];

  always_ff @(posedge clk) begin
    if (we && wa != ZERO_REG) regs[wa] <= wd;
  end

endmodule
