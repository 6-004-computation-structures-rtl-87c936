// tb_wa_mux: exhaustive test of the write-address select: Rc when WASEL = 0,
// register 30 (XP) when WASEL = 1.
module tb_wa_mux;
  logic       wasel;
  logic [4:0] rc, wa;
  int checks = 0, failures = 0;

  wa_mux dut (.wasel, .rc, .wa);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int r = 0; r < 32; r++) begin
        wasel = s[0]; rc = 5'(r);
        #1;
        checks++;
        if (wa !== (s ? 5'd30 : 5'(r))) begin
          failures++;
          $display("wasel=%0d rc=%0d wa=%0d", s, r, wa);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
