// tb_control: exhaustive test of the decoder over all 64 opcodes and every
// combination of Z, IRQ, PC31 and reset, for both MULDIV settings.
//
// The expected control word is written out here per instruction class:
// ALU register/literal ops, LD, ST, JMP, BEQ, BNE, LDR, illegal opcodes, the
// user-mode interrupt override and the reset override.
module tb_control;
  import beta_pkg::*;

  logic [5:0] opcode;
  logic       z, irq, pc31, reset;
  pcsel_e     pcsel [2];
  wdsel_e     wdsel [2];
  alufn_e     alufn [2];
  logic       ra2sel [2], asel [2], bsel [2], wr [2], moe [2], werf [2],
              wasel [2], illop [2], irq_taken [2];
  int checks = 0, failures = 0;

  control #(.MULDIV(0)) dut0 (
    .opcode, .z, .irq, .pc31, .reset, .pcsel(pcsel[0]), .ra2sel(ra2sel[0]),
    .asel(asel[0]), .bsel(bsel[0]), .wdsel(wdsel[0]), .alufn(alufn[0]),
    .wr(wr[0]), .moe(moe[0]), .werf(werf[0]), .wasel(wasel[0]),
    .illop(illop[0]), .irq_taken(irq_taken[0]));
  control #(.MULDIV(1)) dut1 (
    .opcode, .z, .irq, .pc31, .reset, .pcsel(pcsel[1]), .ra2sel(ra2sel[1]),
    .asel(asel[1]), .bsel(bsel[1]), .wdsel(wdsel[1]), .alufn(alufn[1]),
    .wr(wr[1]), .moe(moe[1]), .werf(werf[1]), .wasel(wasel[1]),
    .illop(illop[1]), .irq_taken(irq_taken[1]));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("op=%h z=%0d irq=%0d pc31=%0d rst=%0d %s: got %0d expected %0d",
                 opcode, z, irq, pc31, reset, what, got, exp);
    end
  endtask

  initial begin
    for (int m = 0; m < 2; m++)
    for (int o = 0; o < 64; o++)
    for (int v = 0; v < 16; v++) begin
      int e_pcsel, e_wdsel, e_alufn, e_ra2, e_asel, e_bsel, e_wr, e_moe,
          e_werf, e_wasel;
      bit legal, irqt, aluop, cmp;
      opcode = 6'(o); z = v[0]; irq = v[1]; pc31 = v[2]; reset = v[3];
      #1;
      legal = 1;
      e_pcsel = 0; e_wdsel = 1; e_alufn = -1; e_ra2 = 0; e_asel = 0;
      e_bsel = 0; e_wr = 0; e_moe = 0; e_werf = 0; e_wasel = 0;
      aluop = (o >= 'h20) &&
              ((o % 16) inside {0, 1, 4, 5, 6, 8, 9, 10, 12, 13, 14} ||
               (m == 1 && (o % 16) inside {2, 3}));
      if (aluop) begin
        e_alufn = o % 16; e_bsel = (o >= 'h30); e_werf = 1;
      end else case (o)
        'h18: begin e_alufn = ALU_ADD; e_bsel = 1; e_wdsel = 2; e_werf = 1; e_moe = 1; end
        'h19: begin e_alufn = ALU_ADD; e_bsel = 1; e_ra2 = 1; e_wr = 1; end
        'h1B: begin e_pcsel = 2; e_wdsel = 0; e_werf = 1; end
        'h1C: begin e_pcsel = z ? 1 : 0; e_wdsel = 0; e_werf = 1; end
        'h1D: begin e_pcsel = z ? 0 : 1; e_wdsel = 0; e_werf = 1; end
        'h1F: begin e_alufn = ALU_A; e_asel = 1; e_wdsel = 2; e_werf = 1; e_moe = 1; end
        default: legal = 0;
      endcase
      if (!legal) begin
        e_pcsel = 3; e_wasel = 1; e_werf = 1; e_wdsel = 0; e_wr = 0; e_moe = 0;
      end
      irqt = irq && !pc31 && !reset;
      if (irqt) begin
        e_pcsel = 4; e_wasel = 1; e_werf = 1; e_wdsel = 0; e_wr = 0; e_moe = 0;
      end
      if (reset) begin
        e_wr = 0; e_werf = 0; e_moe = 0;
      end
      chk("illop", int'(illop[m]), int'(!legal));
      chk("irq_taken", int'(irq_taken[m]), int'(irqt));
      chk("pcsel", int'(pcsel[m]), e_pcsel);
      chk("wr", int'(wr[m]), e_wr);
      chk("moe", int'(moe[m]), e_moe);
      chk("werf", int'(werf[m]), e_werf);
      if (e_werf) begin
        chk("wasel", int'(wasel[m]), e_wasel);
        chk("wdsel", int'(wdsel[m]), e_wdsel);
      end
      // Datapath selects matter only where the result is used.
      if (e_alufn >= 0 && !irqt && !reset) begin
        chk("alufn", int'(alufn[m]), e_alufn);
        chk("asel", int'(asel[m]), e_asel);
        chk("bsel", int'(bsel[m]), e_bsel);
      end
      if (e_wr) chk("ra2sel", int'(ra2sel[m]), e_ra2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
