// tb_beta: end-to-end test of the Beta processor with its default parameters.
//
// The processor runs from a behavioural 1024-word memory. An instruction-level
// reference model, written independently of the RTL, executes the same program
// in lock step. Just before every rising clock edge the testbench compares the
// processor's instruction address, data address (for ALU, LD, ST, LDR), write
// data, WR and MOE with the model, and every architectural register with the
// model's copy.
//
// Phase 1 runs a directed program: reset, trap vectors at 0, 4 and 8, every
// ALU operation, LD/ST/LDR, taken and untaken BEQ/BNE, two illegal opcodes, a
// JMP that drops into user mode, a JMP that tries to set the supervisor bit,
// an IRQ in supervisor mode (ignored) and one in user mode (taken), ending in a
// two-instruction loop. Hand-computed register values are checked at the end.
// Phase 2 resets the processor again and runs a long random program with
// random interrupt requests. Each mechanism (reset, trap, interrupt taken and
// ignored, supervisor clear by JMP, blocked supervisor set, branches taken and
// not, loads, stores, R31 writes) must be seen at least once.
module tb_beta;
  import beta_pkg::*;
  import beta_asm_pkg::*;
  import beta_ref_pkg::*;

  localparam int unsigned RAND_CYCLES = 40000;
  localparam int unsigned RAND_BLOCK  = 1000;

  logic        clk = 1'b0;
  logic        reset, irq;
  logic [31:0] ia, id, ma, mrd, mwd;
  logic        moe, wr;

  int checks = 0, failures = 0;

  // The lab's test clock: 100 ns cycle.
  localparam int PERIOD = 100;

  always #(PERIOD / 2) clk = ~clk;

  beta dut (.clk, .reset, .irq, .ia, .id, .ma, .moe, .mrd, .wr, .mwd);

  beta_mem_model u_mem (.clk, .ia, .id, .moe, .ma, .mrd, .wr, .mwd);

  // Watchdog.
  initial begin
    #(PERIOD * (RAND_CYCLES + 5000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model, MUL/DIV not implemented.
  beta_ref rm = new(1'b0);

  // ---------------------------------------------------------------------
  // Program loading
  // ---------------------------------------------------------------------
  logic [31:0] apc;  // assembly address

  task automatic put(logic [31:0] w);
    u_mem.mem[apc[11:2]] = w;
    rm.mem[apc[11:2]]   = w;
    apc += 4;
  endtask

  task automatic put_at(logic [31:0] addr, logic [31:0] w);
    u_mem.mem[addr[11:2]] = w;
    rm.mem[addr[11:2]]   = w;
  endtask

  // Byte addresses of the directed program's labels.
  localparam logic [31:0] L_RESET = 32'h010, L_ILLOP = 32'h100, L_INTR = 32'h140;
  localparam logic [31:0] L_USER  = 32'h200, L_USER2 = 32'h240, L_LOOP = 32'h244;
  localparam logic [31:0] L_UNEXT = 32'h280, L_FINAL = 32'h2C0;
  localparam logic [31:0] D_DATA  = 32'h300, D_CONST = 32'h304, D_ST = 32'h340;
  localparam logic [31:0] L_BAD   = 32'h3F0;

  task automatic load_directed();
    for (int i = 0; i < 1024; i++) put_at(32'(i) * 4, 32'h0);
    apc = 0;
    put(enc_br(OP_BEQ, 5'd31, 32'h000, L_RESET, 5'd31));
    put(enc_br(OP_BEQ, 5'd31, 32'h004, L_ILLOP, 5'd31));
    put(enc_br(OP_BEQ, 5'd31, 32'h008, L_INTR,  5'd31));
    apc = L_RESET;
    put(enc_opc(OP_ADDC,  5'd31, 16'd0,     5'd20));  // r20 = 0 (trap count)
    put(enc_opc(OP_ADDC,  5'd31, 16'd0,     5'd21));  // r21 = 0 (interrupt count)
    put(enc_opc(OP_ADDC,  5'd31, 16'd5,     5'd1));   // r1 = 5
    put(enc_opc(OP_ADDC,  5'd31, 16'hFFFD,  5'd2));   // r2 = -3
    put(enc_op (OP_ADD,   5'd1,  5'd2,      5'd3));   // r3 = 2
    put(enc_op (OP_SUB,   5'd1,  5'd2,      5'd4));   // r4 = 8
    put(enc_op (OP_CMPLT, 5'd2,  5'd1,      5'd5));   // r5 = 1
    put(enc_op (OP_CMPLE, 5'd1,  5'd1,      5'd6));   // r6 = 1
    put(enc_op (OP_CMPEQ, 5'd1,  5'd2,      5'd7));   // r7 = 0
    put(enc_op (OP_AND,   5'd1,  5'd2,      5'd8));   // r8 = 5
    put(enc_op (OP_OR,    5'd1,  5'd4,      5'd9));   // r9 = 13
    put(enc_op (OP_XOR,   5'd1,  5'd4,      5'd10));  // r10 = 13
    put(enc_opc(OP_SHLC,  5'd1,  16'd4,     5'd11));  // r11 = 80
    put(enc_opc(OP_SHRC,  5'd2,  16'd28,    5'd12));  // r12 = 15
    put(enc_opc(OP_SRAC,  5'd2,  16'd1,     5'd13));  // r13 = -2
    put(enc_op (OP_SHL,   5'd1,  5'd1,      5'd14));  // r14 = 160
    put(enc_op (OP_SHR,   5'd2,  5'd3,      5'd15));  // r15 = 0x3FFFFFFF
    put(enc_op (OP_SRA,   5'd2,  5'd3,      5'd16));  // r16 = -1
    put(enc_opc(OP_SUBC,  5'd1,  16'd7,     5'd17));  // r17 = -2
    put(enc_opc(OP_ANDC,  5'd2,  16'h00F0,  5'd18));  // r18 = 0xF0
    put(enc_opc(OP_ORC,   5'd1,  16'h0100,  5'd19));  // r19 = 0x105
    put(enc_opc(OP_XORC,  5'd1,  16'hFFFF,  5'd22));  // r22 = ~5
    put(enc_opc(OP_CMPEQC,5'd1,  16'd5,     5'd23));  // r23 = 1
    put(enc_opc(OP_CMPLTC,5'd2,  16'hFFFD,  5'd24));  // r24 = 0
    put(enc_opc(OP_CMPLEC,5'd2,  16'hFFFD,  5'd25));  // r25 = 1
    put(enc_opc(OP_ST,    5'd31, D_ST[15:0], 5'd4));  // Mem[0x340] = 8
    put(enc_opc(OP_LD,    5'd31, D_ST[15:0], 5'd26)); // r26 = 8
    put(enc_br (OP_LDR,   5'd31, apc, D_DATA, 5'd27));// r27 = 0x12345678
    put(enc_br (OP_BEQ,   5'd7,  apc, apc + 8, 5'd28));  // taken, r28 = PC+4
    put(enc_opc(OP_ADDC,  5'd31, 16'd99, 5'd3));      // skipped
    put(enc_br (OP_BNE,   5'd7,  apc, L_BAD, 5'd31)); // not taken
    put(enc_br (OP_BNE,   5'd1,  apc, apc + 8, 5'd31));  // taken
    put(enc_opc(OP_ADDC,  5'd31, 16'd99, 5'd3));      // skipped
    put(enc_br (OP_BEQ,   5'd1,  apc, L_BAD, 5'd31)); // not taken
    put(32'h0000_0000);                               // illegal opcode 0
    put(enc_op (OP_MUL,   5'd1,  5'd1, 5'd3));        // illegal (no MUL/DIV)
    put(enc_opc(OP_ADDC,  5'd31, L_USER[15:0], 5'd29));
    put(enc_op (OP_JMP,   5'd29, 5'd0, 5'd31));       // into user mode
    // Illegal-instruction handler: count in r20, return.
    apc = L_ILLOP;
    put(enc_opc(OP_ADDC,  5'd20, 16'd1, 5'd20));
    put(enc_op (OP_JMP,   5'd30, 5'd0, 5'd31));
    // Interrupt handler: count in r21, re-execute the aborted instruction.
    apc = L_INTR;
    put(enc_opc(OP_SUBC,  5'd30, 16'd4, 5'd30));
    put(enc_opc(OP_ADDC,  5'd21, 16'd1, 5'd21));
    put(enc_op (OP_JMP,   5'd30, 5'd0, 5'd31));
    // User mode: try to set the supervisor bit with JMP.
    apc = L_USER;
    put(enc_br (OP_LDR,   5'd31, apc, D_CONST, 5'd29));  // r29 = 0x80000240
    put(enc_op (OP_JMP,   5'd29, 5'd0, 5'd31));          // lands at 0x240, user
    apc = L_USER2;
    put(enc_opc(OP_ADDC,  5'd31, 16'd0, 5'd23));         // r23 = 0
    // Loop 8 times; the IRQ arrives in here.
    apc = L_LOOP;
    put(enc_opc(OP_ADDC,  5'd23, 16'd1, 5'd23));
    put(enc_opc(OP_CMPLTC,5'd23, 16'd8, 5'd24));
    put(enc_br (OP_BNE,   5'd24, apc, L_LOOP, 5'd31));
    put(32'hFC00_0000);                                  // illegal in user mode
    put(enc_br (OP_BEQ,   5'd31, apc, L_FINAL, 5'd31));
    apc = L_FINAL;
    put(enc_opc(OP_ADDC,  5'd31, 16'd1, 5'd31));         // write to R31
    put(enc_br (OP_BEQ,   5'd31, apc, L_FINAL, 5'd31));
    apc = L_BAD;
    put(enc_br (OP_BEQ,   5'd31, apc, L_BAD, 5'd31));
    put_at(D_DATA,  32'h1234_5678);
    put_at(D_CONST, 32'h8000_0000 | L_USER2);
  endtask

  task automatic load_random();
    for (int i = 0; i < 1024; i++) put_at(32'(i) * 4, rm.rand_instr());
  endtask

  // ---------------------------------------------------------------------
  // Run loop
  // ---------------------------------------------------------------------
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("%0t %s: got %h expected %h (pc %h)", $time, what, got, exp, rm.pc);
    end
  endtask

  // One cycle: inputs set after the previous rising edge, outputs checked
  // just before the next one.
  task automatic cycle(bit rst, bit irq_in, bit pc_known);
    bit e_wr, e_moe, chk_ma;
    logic [31:0] e_ma, e_mwd;
    reset = rst;
    irq   = irq_in;
    #(PERIOD - 3);
    if (pc_known) begin
      check("ia", ia, rm.pc);
      for (int r = 0; r < 31; r++) check("reg", dut.u_rf.regs[r], rm.regs[r]);
    end
    rm.step(rst, irq_in, e_wr, e_moe, chk_ma, e_ma, e_mwd);
    check("wr", 32'(wr), 32'(e_wr));
    check("moe", 32'(moe), 32'(e_moe));
    if (chk_ma && !rst) check("ma", ma, e_ma);
    if (e_wr) check("mwd", mwd, e_mwd);
    @(posedge clk);
    #1;
  endtask

  int cyc;

  initial begin
    reset = 1'b1;
    irq   = 1'b0;
    load_directed();
    for (int r = 0; r < 32; r++) rm.regs[r] = dut.u_rf.regs[r];
    rm.pc = 32'h0;
    @(posedge clk);
    #1;
    // ---- Phase 1: directed program --------------------------------------
    cycle(1'b1, 1'b0, 1'b0);
    for (int r = 0; r < 32; r++) rm.regs[r] = dut.u_rf.regs[r];
    for (cyc = 1; cyc < 300; cyc++) begin
      // IRQ in cycle 10 (supervisor mode, ignored) and once inside the
      // user-mode loop (taken).
      cycle(1'b0, (cyc == 10) || (rm.pc == L_LOOP + 4 && rm.n_irq == 0), 1'b1);
    end
    check("final loop reached", 32'(rm.pc inside {L_FINAL, L_FINAL + 4}), 1);
    check("r3",  dut.u_rf.regs[3],  2);
    check("r4",  dut.u_rf.regs[4],  8);
    check("r9",  dut.u_rf.regs[9],  13);
    check("r13", dut.u_rf.regs[13], 32'hFFFF_FFFE);
    check("r15", dut.u_rf.regs[15], 32'h3FFF_FFFF);
    check("r19", dut.u_rf.regs[19], 32'h105);
    check("r20 (illegal traps)", dut.u_rf.regs[20], 3);
    check("r21 (interrupts)",    dut.u_rf.regs[21], 1);
    check("r23 (loop count)",    dut.u_rf.regs[23], 8);
    check("r26 (LD)",            dut.u_rf.regs[26], 8);
    check("r27 (LDR)",           dut.u_rf.regs[27], 32'h1234_5678);
    check("PC31 clear in user",  32'(ia[31]), 0);
    check("illegal traps", rm.n_illop, 3);
    check("interrupts",    rm.n_irq, 1);
    // ---- Phase 2: random program with random interrupts ----------------
    // A fresh program, entered through reset, every RAND_BLOCK cycles.
    for (cyc = 0; cyc < RAND_CYCLES; cyc++) begin
      if (cyc % RAND_BLOCK == 0) begin
        load_random();
        cycle(1'b1, 1'b0, 1'b1);
      end
      cycle(1'b0, $urandom_range(0, 19) == 0, 1'b1);
    end
    // ---- Mechanism coverage --------------------------------------------
    $display("resets=%0d illop=%0d irq=%0d irq_ignored=%0d jmp_clear=%0d jmp_noset=%0d",
             rm.n_reset, rm.n_illop, rm.n_irq, rm.n_irq_ignored, rm.n_jmp_clear, rm.n_jmp_noset);
    $display("br_taken=%0d br_not=%0d ld=%0d st=%0d ldr=%0d alu=%0d r31_writes=%0d",
             rm.n_br_taken, rm.n_br_not, rm.n_ld, rm.n_st, rm.n_ldr, rm.n_alu, rm.n_r31);
    check("reset seen",           32'(rm.n_reset > 1), 1);
    check("illegal trap seen",    32'(rm.n_illop > 0), 1);
    check("interrupt seen",       32'(rm.n_irq > 0), 1);
    check("ignored irq seen",     32'(rm.n_irq_ignored > 0), 1);
    check("JMP clears sup seen",  32'(rm.n_jmp_clear > 0), 1);
    check("JMP cannot set seen",  32'(rm.n_jmp_noset > 0), 1);
    check("branch taken seen",    32'(rm.n_br_taken > 0), 1);
    check("branch not taken seen",32'(rm.n_br_not > 0), 1);
    check("LD seen",              32'(rm.n_ld > 0), 1);
    check("ST seen",              32'(rm.n_st > 0), 1);
    check("LDR seen",             32'(rm.n_ldr > 0), 1);
    check("R31 write seen",       32'(rm.n_r31 > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
