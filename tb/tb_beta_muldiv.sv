// tb_beta_muldiv: end-to-end test of the Beta built with the optional
// MUL/MULC/DIV/DIVC instructions (MULDIV = 1).
//
// Runs random programs, each entered through reset, with random interrupt
// requests, against the instruction-level reference model configured with
// MUL/DIV. Just before every rising edge it compares the instruction address,
// data address, write data, WR, MOE and all registers with the model, and it
// requires that MUL and DIV executed (and traps and interrupts happened).
module tb_beta_muldiv;
  import beta_pkg::*;
  import beta_ref_pkg::*;

  localparam int unsigned RAND_CYCLES = 30000;
  localparam int unsigned RAND_BLOCK  = 1000;
  localparam int          PERIOD      = 100;

  logic        clk = 1'b0;
  logic        reset, irq;
  logic [31:0] ia, id, ma, mrd, mwd;
  logic        moe, wr;

  int checks = 0, failures = 0;

  always #(PERIOD / 2) clk = ~clk;

  beta #(.MULDIV(1'b1)) dut (.clk, .reset, .irq, .ia, .id, .ma, .moe, .mrd, .wr, .mwd);

  beta_mem_model u_mem (.clk, .ia, .id, .moe, .ma, .mrd, .wr, .mwd);

  beta_ref rm = new(1'b1);

  initial begin
    #(PERIOD * (RAND_CYCLES + 2000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("%0t %s: got %h expected %h (pc %h)", $time, what, got, exp, rm.pc);
    end
  endtask

  task automatic cycle(bit rst, bit irq_in);
    bit e_wr, e_moe, chk_ma;
    logic [31:0] e_ma, e_mwd;
    reset = rst;
    irq   = irq_in;
    #(PERIOD - 3);
    check("ia", ia, rm.pc);
    for (int r = 0; r < 31; r++) check("reg", dut.u_rf.regs[r], rm.regs[r]);
    rm.step(rst, irq_in, e_wr, e_moe, chk_ma, e_ma, e_mwd);
    check("wr", 32'(wr), 32'(e_wr));
    check("moe", 32'(moe), 32'(e_moe));
    if (chk_ma && !rst) check("ma", ma, e_ma);
    if (e_wr) check("mwd", mwd, e_mwd);
    @(posedge clk);
    #1;
  endtask

  initial begin
    reset = 1'b1;
    irq   = 1'b0;
    @(posedge clk);
    #1;
    // The first reset edge has passed; registers keep their start values.
    for (int r = 0; r < 32; r++) rm.regs[r] = dut.u_rf.regs[r];
    rm.pc = RESET_ADDR;
    for (int cyc = 0; cyc < RAND_CYCLES; cyc++) begin
      if (cyc % RAND_BLOCK == 0) begin
        for (int i = 0; i < 1024; i++) begin
          logic [31:0] w;
          w = rm.rand_instr();
          u_mem.mem[i] = w;
          rm.mem[i]    = w;
        end
        cycle(1'b1, 1'b0);
      end
      cycle(1'b0, $urandom_range(0, 19) == 0);
    end
    $display("mul=%0d div=%0d illop=%0d irq=%0d alu=%0d",
             rm.n_mul, rm.n_div, rm.n_illop, rm.n_irq, rm.n_alu);
    check("MUL seen",          32'(rm.n_mul > 0), 1);
    check("DIV seen",          32'(rm.n_div > 0), 1);
    check("illegal trap seen", 32'(rm.n_illop > 0), 1);
    check("interrupt seen",    32'(rm.n_irq > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
