// tb_branch_adder: checks PC+4 + 4*SEXT(C) for edge literals (0, 1, -1,
// 0x7FFF, 0x8000) and random values, with the expected value computed by
// integer arithmetic on the signed literal.
module tb_branch_adder;
  logic [31:0] pc_plus4, target;
  logic [15:0] lit;
  int checks = 0, failures = 0;

  branch_adder dut (.pc_plus4, .lit, .target);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(logic [31:0] p, logic [15:0] l);
    longint e;
    pc_plus4 = p; lit = l;
    #1;
    e = longint'(p) + 4 * longint'($signed(l));
    checks++;
    if (target !== 32'(e)) begin
      failures++;
      $display("pc4=%h lit=%h got %h expected %h", p, l, target, 32'(e));
    end
  endtask

  initial begin
    try(32'h100, 16'h0000);
    try(32'h100, 16'h0001);
    try(32'h100, 16'hFFFF);
    try(32'h100, 16'h7FFF);
    try(32'h0004_0000, 16'h8000);
    try(32'h8000_0010, 16'hFFFC);
    for (int i = 0; i < 5000; i++) try($urandom, 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
