// tb_regfile: self-checking test of the 32 x 32 register file.
//
// Writes every register, reads both ports back, checks that R31 reads zero
// after a write, that a write with WE = 0 changes nothing, that a write only
// takes effect at the clock edge, and runs random traffic against a model.
module tb_regfile;
  logic        clk = 1'b0;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic        we;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  regfile dut (.clk, .ra1, .rd1, .ra2, .rd2, .we, .wa, .wd);

  initial begin
    #1000000;
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

  task automatic write(logic [4:0] a, logic [31:0] d, logic en);
    we = en; wa = a; wd = d;
    @(posedge clk); #1;
    if (en && a != 5'd31) model[a] = d;
    we = 1'b0;
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    @(posedge clk); #1;
    for (int r = 0; r < 32; r++) write(5'(r), 32'hA500_0000 + 32'(r), 1'b1);
    for (int r = 0; r < 32; r++) begin
      ra1 = 5'(r); ra2 = 5'(31 - r); #1;
      check("rd1", rd1, r == 31 ? 0 : 32'hA500_0000 + 32'(r));
      check("rd2", rd2, r == 0 ? 0 : 32'hA500_0000 + 32'(31 - r));
    end
    write(5'd7, 32'hDEAD_BEEF, 1'b0);
    ra1 = 5'd7; #1;
    check("no write with we=0", rd1, 32'hA500_0007);
    // Write visible only after the edge.
    we = 1'b1; wa = 5'd9; wd = 32'h1234_5678; ra1 = 5'd9;
    #1;
    check("before edge", rd1, 32'hA500_0009);
    @(posedge clk); #1;
    model[9] = 32'h1234_5678;
    check("after edge", rd1, 32'h1234_5678);
    we = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      logic [4:0] a;
      a = 5'($urandom);
      write(a, $urandom, 1'($urandom));
      ra1 = 5'($urandom); ra2 = 5'($urandom); #1;
      check("rand rd1", rd1, ra1 == 31 ? 0 : model[ra1]);
      check("rand rd2", rd2, ra2 == 31 ? 0 : model[ra2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
