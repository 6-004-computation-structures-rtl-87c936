// beta_mem_model: behavioural model of the Beta's main memory, for testbenches.
//
// 1024 words of 32 bits, word-addressed by address bits 11:2, with three ports:
// an always-enabled instruction read port (ia -> id), a data read port that
// drives mrd only while moe = 1 (0 otherwise), and a data write port that
// stores mwd at ma on the rising clock edge while wr = 1. Both reads are
// asynchronous. Testbenches load it by writing the mem array directly.
module beta_mem_model #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] ia,
  output logic [31:0] id,
  input  logic        moe,
  input  logic [31:0] ma,
  output logic [31:0] mrd,
  input  logic        wr,
  input  logic [31:0] mwd
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  assign id  = mem[ia[AW+1:2]];
  assign mrd = moe ? mem[ma[AW+1:2]] : '0;

  always_ff @(posedge clk) begin
    if (wr) mem[ma[AW+1:2]] <= mwd;
  end

endmodule
