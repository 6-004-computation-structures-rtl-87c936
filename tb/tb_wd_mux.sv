// tb_wd_mux: checks that WDSEL 0, 1 and 2 select PC+4, the ALU result and the
// memory read data.
module tb_wd_mux;
  import beta_pkg::*;
  wdsel_e      wdsel;
  logic [31:0] pc_plus4, alu, mrd, wd;
  int checks = 0, failures = 0;

  wd_mux dut (.wdsel, .pc_plus4, .alu, .mrd, .wd);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] e;
      wdsel = wdsel_e'($urandom_range(0, 2));
      pc_plus4 = $urandom; alu = $urandom; mrd = $urandom;
      #1;
      e = (wdsel == WDSEL_PC4) ? pc_plus4 : (wdsel == WDSEL_ALU) ? alu : mrd;
      checks++;
      if (wd !== e) begin
        failures++;
        $display("wdsel=%0d got %h expected %h", wdsel, wd, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
