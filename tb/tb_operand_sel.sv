// tb_operand_sel: checks the ASEL/BSEL operand muxes, the Z flag and the JMP
// target, including the supervisor rule for JT bit 31:
//   old PC31 = 0          -> 0
//   old PC31 = 1, RD1[31] -> RD1[31]
// and that the LDR address on input A always has bit 31 = 0.
module tb_operand_sel;
  logic        asel, bsel, z, pc31;
  logic [31:0] rd1, rd2, br_target, a, b, jt;
  logic [15:0] lit;
  int checks = 0, failures = 0;

  operand_sel dut (.asel, .bsel, .rd1, .rd2, .br_target, .lit, .pc31,
                   .a, .b, .z, .jt);

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

  initial begin
    // Supervisor table for JMP.
    for (int p = 0; p < 2; p++)
      for (int j = 0; j < 2; j++) begin
        pc31 = p[0]; rd1 = {j[0], 31'h1234_5677};
        asel = 0; bsel = 0; rd2 = 0; br_target = 0; lit = 0;
        #1;
        check("jt31", 32'(jt[31]), (p == 1 && j == 1) ? 1 : 0);
        check("jt low", jt[30:0], 31'h1234_5674);
      end
    rd1 = 0; #1;
    check("z on zero", 32'(z), 1);
    rd1 = 32'h8000_0000; #1;
    check("z on nonzero", 32'(z), 0);
    for (int i = 0; i < 5000; i++) begin
      asel = 1'($urandom); bsel = 1'($urandom); pc31 = 1'($urandom);
      rd1 = ($urandom_range(0, 9) == 0) ? 0 : $urandom;
      rd2 = $urandom; br_target = $urandom; lit = 16'($urandom);
      #1;
      check("a", a, asel ? (br_target & 32'h7FFF_FFFF) : rd1);
      check("b", b, bsel ? 32'(signed'(lit)) : rd2);
      check("z", 32'(z), rd1 == 0 ? 1 : 0);
      check("jt", jt, {pc31 & rd1[31], rd1[30:2], 2'b00});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
