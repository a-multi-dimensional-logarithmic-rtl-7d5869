// Self-checking testbench of the ALU: every operation on random and corner
// operands against an independent model.
module tb_tlns_alu;
  import tlns_pkg::*;
  alu_op_e op;
  logic [23:0] a, b, y, e;
  int checks = 0, failures = 0;

  tlns_alu dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [23:0] model(alu_op_e o, logic [23:0] x, logic [23:0] z);
    int sx, sz;
    sx = int'($signed(x)); sz = int'($signed(z));
    case (o)
      ALU_ADD: return x + z;
      ALU_SUB: return x - z;
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_XOR: return x ^ z;
      ALU_SLL: return 24'((longint'(x) << z[4:0]));
      ALU_SRL: return x >> z[4:0];
      ALU_SRA: return 24'(sx >>> z[4:0]);
      ALU_LHI: return {z[9:0], 14'd0};
      ALU_PASS_B: return z;
      ALU_SEQ: return (sx == sz) ? 1 : 0;
      ALU_SNE: return (sx != sz) ? 1 : 0;
      ALU_SLT: return (sx <  sz) ? 1 : 0;
      ALU_SGT: return (sx >  sz) ? 1 : 0;
      ALU_SLE: return (sx <= sz) ? 1 : 0;
      ALU_SGE: return (sx >= sz) ? 1 : 0;
      ALU_SLTU: return (int'(x) <  int'(z)) ? 1 : 0;
      ALU_SGTU: return (int'(x) >  int'(z)) ? 1 : 0;
      ALU_SLEU: return (int'(x) <= int'(z)) ? 1 : 0;
      ALU_SGEU: return (int'(x) >= int'(z)) ? 1 : 0;
      default: return 0;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      op = alu_op_e'(n % 20);
      case ($urandom_range(0, 3))
        0: begin a = 24'($urandom); b = 24'($urandom); end
        1: begin a = 24'($urandom_range(0, 20)); b = 24'($urandom_range(0, 20)); end
        2: begin a = 24'h800000; b = 24'($urandom); end
        default: begin a = 24'($urandom); b = a; end
      endcase
      #1;
      e = model(op, a, b);
      checks++;
      if (y !== e) begin failures++; $display("op %s a %h b %h got %h exp %h", op.name(), a, b, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
