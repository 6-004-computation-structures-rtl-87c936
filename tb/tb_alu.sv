// tb_alu: checks every ALU function on corner and random operands.
//
// Two instances: the default one (MUL/DIV not built) and one with MULDIV = 1,
// whose product and quotient are checked too, including divide by zero and
// the -2^31 / -1 overflow. Expected values use 64-bit integer arithmetic.
module tb_alu;
  import beta_pkg::*;
  alufn_e      alufn;
  logic [31:0] a, b, y, ym;
  int checks = 0, failures = 0;

  alu               dut  (.alufn, .a, .b, .y);
  alu #(.MULDIV(1)) dutm (.alufn, .a, .b, .y(ym));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(alufn_e f, logic [31:0] x, logic [31:0] w,
                                        bit md);
    longint sx, sw;
    sx = longint'($signed(x));
    sw = longint'($signed(w));
    case (f)
      ALU_ADD:   return 32'(sx + sw);
      ALU_SUB:   return 32'(sx - sw);
      ALU_MUL:   return md ? 32'(sx * sw) : 0;
      ALU_DIV:   if (!md) return 0;
                 else if (w == 0) return 32'hFFFF_FFFF;
                 else return 32'(sx / sw);
      ALU_CMPEQ: return (x == w) ? 1 : 0;
      ALU_CMPLT: return (sx < sw) ? 1 : 0;
      ALU_CMPLE: return (sx <= sw) ? 1 : 0;
      ALU_A:     return x;
      ALU_AND:   return x & w;
      ALU_OR:    return x | w;
      ALU_XOR:   return x ^ w;
      ALU_SHL:   return 32'({32'b0, x} << w[4:0]);
      ALU_SHR:   return 32'({32'b0, x} >> w[4:0]);
      ALU_SRA:   return 32'(sx >>> w[4:0]);
      default:   return 0;
    endcase
  endfunction

  alufn_e fns [14] = '{ALU_ADD, ALU_SUB, ALU_MUL, ALU_DIV, ALU_CMPEQ, ALU_CMPLT,
                       ALU_CMPLE, ALU_A, ALU_AND, ALU_OR, ALU_XOR, ALU_SHL,
                       ALU_SHR, ALU_SRA};
  logic [31:0] corner [8] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF,
                              32'h8000_0000, 32'h0000_001F, 32'h0000_0020,
                              32'h1234_5678};

  task automatic try(alufn_e f, logic [31:0] x, logic [31:0] w);
    alufn = f; a = x; b = w;
    #1;
    checks += 2;
    if (y !== model(f, x, w, 0)) begin
      failures++;
      $display("%s %h %h: got %h expected %h", f.name(), x, w, y, model(f, x, w, 0));
    end
    if (ym !== model(f, x, w, 1)) begin
      failures++;
      $display("MULDIV %s %h %h: got %h expected %h", f.name(), x, w, ym, model(f, x, w, 1));
    end
  endtask

  initial begin
    foreach (fns[i])
      foreach (corner[j])
        foreach (corner[k]) try(fns[i], corner[j], corner[k]);
    for (int i = 0; i < 20000; i++)
      try(fns[$urandom_range(0, 13)], $urandom, ($urandom_range(0, 3) == 0) ? 32'($urandom_range(0, 40)) : $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
