// Integer ALU of the 2DLNS CPU. It computes y = f(a, b) for the
// arithmetic, logic, shift and set-on-condition instructions on 24-bit
// two's-complement or unsigned operands; the set instructions return 1 or 0.
// Shifts use the low five bits of b. ALU_LHI places the low 10 bits of b in
// bits [23:14] (load high immediate); the position is the one the example
// programs imply by shifting a start address left by 14 before combining it.
// Signed and unsigned add/subtract give the same bits: there is no overflow
// trap. Purely combinational.
module tlns_alu
  import tlns_pkg::*;
#(
  parameter int WIDTH = 24
) (
  input  alu_op_e          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  logic signed [WIDTH-1:0] sa, sb;
  logic [4:0] shamt;
  assign sa = a;
  assign sb = b;
  assign shamt = b[4:0];

  always_comb begin
    unique case (op)
      ALU_ADD:    y = a + b;
      ALU_SUB:    y = a - b;
      ALU_AND:    y = a & b;
      ALU_OR:     y = a | b;
      ALU_XOR:    y = a ^ b;
      ALU_SLL:    y = a << shamt;
      ALU_SRL:    y = a >> shamt;
      ALU_SRA:    y = WIDTH'(sa >>> shamt);
      ALU_LHI:    y = {b[9:0], {(WIDTH-10){1'b0}}};
      ALU_PASS_B: y = b;
      ALU_SEQ:    y = WIDTH'(a == b);
      ALU_SNE:    y = WIDTH'(a != b);
      ALU_SLT:    y = WIDTH'(sa <  sb);
      ALU_SGT:    y = WIDTH'(sa >  sb);
      ALU_SLE:    y = WIDTH'(sa <= sb);
      ALU_SGE:    y = WIDTH'(sa >= sb);
      ALU_SLTU:   y = WIDTH'(a <  b);
      ALU_SGTU:   y = WIDTH'(a >  b);
      ALU_SLEU:   y = WIDTH'(a <= b);
      ALU_SGEU:   y = WIDTH'(a >= b);
      default:    y = '0;
    endcase
  end
endmodule
