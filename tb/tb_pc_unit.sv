// tb_pc_unit: self-checking test of the PC register and next-PC select.
//
// Checks reset to 0x80000000, each PCSEL input (PC+4, branch, JT, the two
// trap addresses), that PC+4 and the branch input keep the current
// supervisor bit, that PC+4 wraps within bits 30:0, and that the PC changes
// exactly once per clock edge. Expected values are computed here.
module tb_pc_unit;
  import beta_pkg::*;

  logic        clk = 1'b0, reset;
  pcsel_e      pcsel;
  logic [31:0] br_target, jt, pc, pc_plus4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pc_unit dut (.clk, .reset, .pcsel, .br_target, .jt, .pc, .pc_plus4);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  // Apply a select for one edge and check the new PC.
  task automatic step(pcsel_e s, logic [31:0] br, logic [31:0] j, logic [31:0] exp);
    pcsel = s; br_target = br; jt = j;
    #1;
    @(posedge clk);
    #1;
    check($sformatf("pcsel=%0d", s), pc, exp);
  endtask

  logic [31:0] p, rb;

  initial begin
    reset = 1'b1; pcsel = PCSEL_INC; br_target = 0; jt = 0;
    @(posedge clk); #1;
    check("reset", pc, 32'h8000_0000);
    check("pc+4 after reset", pc_plus4, 32'h8000_0004);
    reset = 1'b0;
    step(PCSEL_INC, 0, 0, 32'h8000_0004);
    step(PCSEL_BR, 32'h0000_0100, 0, 32'h8000_0100);      // keeps PC31 = 1
    step(PCSEL_JT, 0, 32'h0000_0200, 32'h0000_0200);      // into user mode
    step(PCSEL_BR, 32'hFFFF_0040, 0, 32'h7FFF_0040);      // keeps PC31 = 0
    step(PCSEL_INC, 0, 0, 32'h7FFF_0044);
    step(PCSEL_JT, 0, 32'h7FFF_FFFC, 32'h7FFF_FFFC);
    check("pc+4 wraps in bits 30:0", pc_plus4, 32'h0000_0000);
    step(PCSEL_INC, 0, 0, 32'h0000_0000);
    step(PCSEL_ILLOP, 0, 0, 32'h8000_0004);
    step(PCSEL_JT, 0, 32'h8000_0010, 32'h8000_0010);
    step(PCSEL_XADR, 0, 0, 32'h8000_0008);
    // Random sequence against a model.
    p = pc;
    for (int i = 0; i < 2000; i++) begin
      pcsel_e s;
      logic [31:0] nb, nj, e, p4;
      s  = pcsel_e'($urandom_range(0, 4));
      nb = $urandom & ~32'h3;
      nj = $urandom & ~32'h3;
      p4 = {p[31], p[30:0] + 31'd4};
      check("pc_plus4", pc_plus4, p4);
      case (s)
        PCSEL_INC:   e = p4;
        PCSEL_BR:    e = {p[31], nb[30:0]};
        PCSEL_JT:    e = nj;
        PCSEL_ILLOP: e = 32'h8000_0004;
        default:     e = 32'h8000_0008;
      endcase
      step(s, nb, nj, e);
      p = e;
    end
    // Reset from anywhere.
    reset = 1'b1; pcsel = PCSEL_JT; jt = 32'h0000_1234;
    @(posedge clk); #1;
    check("reset again", pc, 32'h8000_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
