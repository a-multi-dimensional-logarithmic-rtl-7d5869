// Immediate extender (X1/X2 of the CPU organization). It widens the 10-bit
// I-type immediate (sign- or zero-extended) or the 18-bit J-type immediate
// (sign-extended) of the instruction word to 24 bits, or passes a whole word
// read from instruction memory (a filter coefficient) through unchanged.
// Which instructions zero-extend (the unsigned-immediate ones) is this
// design's choice. Purely combinational.
module tlns_extender (
  input  logic [1:0]  mode,   // 0: sext imm10, 1: zext imm10, 2: sext imm18, 3: pass word
  input  logic [23:0] word,
  output logic [23:0] y
);
  always_comb begin
    unique case (mode)
      2'd0:    y = {{14{word[9]}}, word[9:0]};
      2'd1:    y = {14'd0, word[9:0]};
      2'd2:    y = {{6{word[17]}}, word[17:0]};
      default: y = word;
    endcase
  end
endmodule
