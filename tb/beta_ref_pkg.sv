// beta_ref_pkg: instruction-level reference model of the Beta, for testbenches.
//
// The class beta_ref holds the architectural state (PC, 32 registers, 1024
// words of memory) and executes one instruction per call of step(), written
// directly from the instruction set definitions and independent of the RTL.
// step() also returns what the processor's memory bus must show in that
// cycle: WR, MOE, the data address (when it is defined by the instruction)
// and the write data. It counts each mechanism it exercises so a testbench
// can check that all of them happened.
package beta_ref_pkg;

  class beta_ref;
    bit          muldiv;
    logic [31:0] pc;
    logic [31:0] regs [32];
    logic [31:0] mem  [1024];

    int n_reset, n_illop, n_irq, n_irq_ignored, n_jmp_clear, n_jmp_noset;
    int n_br_taken, n_br_not, n_ld, n_st, n_ldr, n_alu, n_r31, n_mul, n_div;

    function new(bit muldiv);
      this.muldiv = muldiv;
      pc = 32'h0;
    endfunction

    function logic [31:0] rreg(logic [4:0] r);
      return (r == 5'd31) ? 32'h0 : regs[r];
    endfunction

    // Execute one instruction (or the reset cycle).
    function void step(input bit rst, input bit irq_in,
                       output bit e_wr, output bit e_moe,
                       output bit chk_ma, output logic [31:0] e_ma,
                       output logic [31:0] e_mwd);
      logic [31:0] ins, pc4, va, vb, vc, sx, bop, res, nxt, wdata, tgt;
      longint      la, lb;
      logic [5:0]  op;
      logic [4:0]  ra, rb, rc, wdst;
      bit          legal, wrreg;
      ins  = mem[pc[11:2]];
      op   = ins[31:26];
      rc   = ins[25:21];
      ra   = ins[20:16];
      rb   = ins[15:11];
      sx   = {{16{ins[15]}}, ins[15:0]};
      pc4  = {pc[31], pc[30:0] + 31'd4};
      tgt  = pc4 + {sx[29:0], 2'b00};
      va   = rreg(ra);
      vb   = rreg(rb);
      vc   = rreg(rc);
      e_wr = 0; e_moe = 0; chk_ma = 0; e_ma = 0; e_mwd = 0;
      legal = 1; wrreg = 0; wdst = rc; wdata = 0; nxt = pc4; res = 0;
      if (rst) begin
        pc = 32'h8000_0000;
        n_reset++;
        return;
      end
      if (op[5]) begin
        bop = op[4] ? sx : vb;
        la  = longint'($signed(va));
        lb  = longint'($signed(bop));
        case (op[3:0])
          4'h0: res = va + bop;
          4'h1: res = va - bop;
          4'h2: if (muldiv) begin res = 32'(la * lb); n_mul++; end else legal = 0;
          4'h3: if (muldiv) begin
                  res = (lb == 0) ? 32'hFFFF_FFFF : 32'(la / lb);
                  n_div++;
                end else legal = 0;
          4'h4: res = (va == bop) ? 1 : 0;
          4'h5: res = (la <  lb) ? 1 : 0;
          4'h6: res = (la <= lb) ? 1 : 0;
          4'h8: res = va & bop;
          4'h9: res = va | bop;
          4'hA: res = va ^ bop;
          4'hC: res = va << bop[4:0];
          4'hD: res = va >> bop[4:0];
          4'hE: res = 32'(la >>> bop[4:0]);
          default: legal = 0;
        endcase
        if (legal) begin
          chk_ma = 1; e_ma = res; wrreg = 1; wdata = res; n_alu++;
        end
      end else begin
        case (op)
          6'h18: begin  // LD
            e_ma = va + sx; chk_ma = 1; e_moe = 1;
            wrreg = 1; wdata = mem[e_ma[11:2]]; n_ld++;
          end
          6'h19: begin  // ST
            e_ma = va + sx; chk_ma = 1; e_wr = 1; e_mwd = vc; n_st++;
          end
          6'h1B: begin  // JMP
            nxt = {pc[31] & va[31], va[30:2], 2'b00};
            wrreg = 1; wdata = pc4;
            if (pc[31] && !va[31]) n_jmp_clear++;
            if (!pc[31] && va[31]) n_jmp_noset++;
          end
          6'h1C, 6'h1D: begin  // BEQ, BNE
            wrreg = 1; wdata = pc4;
            if ((va == 0) == (op == 6'h1C)) begin
              nxt = {pc[31], tgt[30:0]}; n_br_taken++;
            end else n_br_not++;
          end
          6'h1F: begin  // LDR
            e_ma = {1'b0, tgt[30:0]}; chk_ma = 1; e_moe = 1;
            wrreg = 1; wdata = mem[e_ma[11:2]]; n_ldr++;
          end
          default: legal = 0;
        endcase
      end
      if (!legal) begin
        nxt = 32'h8000_0004; wrreg = 1; wdst = 5'd30; wdata = pc4; n_illop++;
      end
      if (irq_in && pc[31]) n_irq_ignored++;
      if (irq_in && !pc[31]) begin
        nxt = 32'h8000_0008; wrreg = 1; wdst = 5'd30; wdata = pc4;
        e_wr = 0; e_moe = 0; n_irq++;
      end
      if (e_wr) mem[e_ma[11:2]] = e_mwd;
      if (wrreg && wdst == 5'd31) n_r31++;
      if (wrreg && wdst != 5'd31) regs[wdst] = wdata;
      pc = nxt;
    endfunction

    // A random instruction word: mostly implemented opcodes, forward
    // branches only (so random code does not settle in a tight loop), and
    // now and then an arbitrary word, usually an illegal opcode.
    function logic [31:0] rand_instr();
      logic [5:0] ops [32] = '{6'h18, 6'h19, 6'h1B, 6'h1C, 6'h1D, 6'h1F,
                               6'h20, 6'h21, 6'h24, 6'h25, 6'h26, 6'h28, 6'h29,
                               6'h2A, 6'h2C, 6'h2D, 6'h2E, 6'h30, 6'h31, 6'h34,
                               6'h35, 6'h36, 6'h38, 6'h39, 6'h3A, 6'h3C, 6'h3D,
                               6'h3E, 6'h22, 6'h23, 6'h32, 6'h33};
      logic [31:0] r;
      r = $urandom;
      if ($urandom_range(0, 49) == 0) return r;
      r[31:26] = ops[$urandom_range(0, 31)];
      if (r[31:26] inside {6'h1C, 6'h1D}) r[15:0] = 16'($urandom_range(0, 20));
      if (r[31:26] == 6'h1F) r[15:0] = 16'($signed($urandom_range(0, 40)) - 20);
      return r;
    endfunction
  endclass

endpackage
