// Shared definitions of the 24-bit two-dimensional logarithmic (2DLNS) CPU.
//
// Number format. A datum is two 2DLNS digits of 12 bits each,
// x = s1*2^a1*D^b1 + s2*2^a2*D^b2, with a one-bit sign s (1 = negative),
// a 6-bit two's-complement binary exponent a and a 5-bit two's-complement
// exponent b of the second base D = 0.92024380912663017. The digit widths
// (B = 6, R = 5, 24 bits for two digits) and D follow the source design; the
// bit order {s, a, b} per digit, digit 1 in bits [23:12] and the use of
// a = -32 as the code of a zero digit are this design's own choices.
//
// Binary values inside the MAC are unsigned magnitudes with FRAC fraction
// bits; register results are two's-complement integers.
//
// Instruction formats (24 bits, 6-bit opcode, 4-bit register fields):
//   R: op[23:18] rs1[17:14] rs2[13:10] rd[9:6] func[5:0]
//   I: op[23:18] rs[17:14]  rd[13:10]  imm10[9:0]
//   J: op[23:18] imm18[17:0]
//   filter: op rs1[17:14] rs2[13:10] filter_sym[9:8] coef_sym[7] order[6:0]
// The opcode and function numbers of the ordinary instructions follow the DLX
// numbering, which matches every encoded word of the source's example program;
// the numbers of tbc, mult, mac, halt and the unsigned set instructions are
// this design's own.
package tlns_pkg;

  localparam int WORD    = 24;   // register, bus, instruction and memory word
  localparam int NREGS   = 16;
  localparam int FRAC    = 8;    // fraction bits of MAC binary values
  localparam int TBC_W   = 32;   // magnitude width of one converted product
  localparam int ACC_W   = 42;   // accumulator width (signed), room for 129 taps
  localparam logic signed [5:0] A_ZERO = -6'sd32;  // exponent code of a zero digit

  typedef struct packed {
    logic              s;   // 1 = negative
    logic signed [5:0] a;   // exponent of base 2
    logic signed [4:0] b;   // exponent of base D
  } digit_t;

  typedef struct packed {
    digit_t d1;
    digit_t d2;
  } tlns_t;

  // 2DLNS value 1.0: digit 1 = +2^0*D^0, digit 2 = zero.
  localparam tlns_t TLNS_ONE = '{d1: '{s: 1'b0, a: 6'sd0, b: 5'sd0},
                                 d2: '{s: 1'b0, a: A_ZERO, b: 5'sd0}};

  typedef enum logic [5:0] {
    OP_SPECIAL = 6'h00, OP_J    = 6'h02, OP_JAL   = 6'h03, OP_BEQZ  = 6'h04,
    OP_BNEZ    = 6'h05, OP_BTC  = 6'h06, OP_TBC   = 6'h07, OP_ADDI  = 6'h08,
    OP_ADDUI   = 6'h09, OP_SUBI = 6'h0A, OP_SUBUI = 6'h0B, OP_ANDI  = 6'h0C,
    OP_ORI     = 6'h0D, OP_XORI = 6'h0E, OP_LHI   = 6'h0F, OP_INPT  = 6'h10,
    OP_OUPT    = 6'h11, OP_JR   = 6'h12, OP_JALR  = 6'h13, OP_SLLI  = 6'h14,
    OP_FILTER  = 6'h15, OP_SRLI = 6'h16, OP_SRAI  = 6'h17, OP_SEQI  = 6'h18,
    OP_SNEI    = 6'h19, OP_SLTI = 6'h1A, OP_SGTI  = 6'h1B, OP_SLEI  = 6'h1C,
    OP_SGEI    = 6'h1D, OP_LW   = 6'h23, OP_SW    = 6'h2B, OP_SEQUI = 6'h30,
    OP_SNEUI   = 6'h31, OP_SLTUI = 6'h32, OP_SGTUI = 6'h33, OP_SLEUI = 6'h34,
    OP_SGEUI   = 6'h35, OP_HALT = 6'h3F
  } opcode_e;

  typedef enum logic [5:0] {
    F_NOP  = 6'h00, F_SLL  = 6'h04, F_SRL  = 6'h06, F_SRA  = 6'h07,
    F_MULT = 6'h0E, F_MAC  = 6'h0F, F_ADD  = 6'h20, F_ADDU = 6'h21,
    F_SUB  = 6'h22, F_SUBU = 6'h23, F_AND  = 6'h24, F_OR   = 6'h25,
    F_XOR  = 6'h26, F_SEQ  = 6'h28, F_SNE  = 6'h29, F_SLT  = 6'h2A,
    F_SGT  = 6'h2B, F_SLE  = 6'h2C, F_SGE  = 6'h2D, F_SEQU = 6'h38,
    F_SNEU = 6'h39, F_SLTU = 6'h3A, F_SGTU = 6'h3B, F_SLEU = 6'h3C,
    F_SGEU = 6'h3D
  } func_e;

  typedef enum logic [4:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLL, ALU_SRL, ALU_SRA,
    ALU_LHI, ALU_PASS_B,
    ALU_SEQ, ALU_SNE, ALU_SLT, ALU_SGT, ALU_SLE, ALU_SGE,
    ALU_SLTU, ALU_SGTU, ALU_SLEU, ALU_SGEU
  } alu_op_e;

  // D^b = m * 2^k with m in [1,2) as an unsigned 1.15 number.
  // Entry b: k = floor(log2(D^b)), m = round(D^b / 2^k * 2^15).
  typedef struct packed {
    logic        [15:0] m;
    logic signed [3:0]  k;
  } dpow_t;

  function automatic dpow_t dpow(input logic signed [5:0] b);
    logic [15:0] m;
    logic signed [3:0] k;
    case (b)
      6'h20: begin m = 16'd58542; k = 4'sd3; end  // b = -32
      6'h21: begin m = 16'd53873; k = 4'sd3; end  // b = -31
      6'h22: begin m = 16'd49576; k = 4'sd3; end  // b = -30
      6'h23: begin m = 16'd45622; k = 4'sd3; end  // b = -29
      6'h24: begin m = 16'd41983; k = 4'sd3; end  // b = -28
      6'h25: begin m = 16'd38635; k = 4'sd3; end  // b = -27
      6'h26: begin m = 16'd35554; k = 4'sd3; end  // b = -26
      6'h27: begin m = 16'd65436; k = 4'sd2; end  // b = -25
      6'h28: begin m = 16'd60217; k = 4'sd2; end  // b = -24
      6'h29: begin m = 16'd55414; k = 4'sd2; end  // b = -23
      6'h2a: begin m = 16'd50995; k = 4'sd2; end  // b = -22
      6'h2b: begin m = 16'd46928; k = 4'sd2; end  // b = -21
      6'h2c: begin m = 16'd43185; k = 4'sd2; end  // b = -20
      6'h2d: begin m = 16'd39741; k = 4'sd2; end  // b = -19
      6'h2e: begin m = 16'd36571; k = 4'sd2; end  // b = -18
      6'h2f: begin m = 16'd33654; k = 4'sd2; end  // b = -17
      6'h30: begin m = 16'd61940; k = 4'sd1; end  // b = -16
      6'h31: begin m = 16'd57000; k = 4'sd1; end  // b = -15
      6'h32: begin m = 16'd52454; k = 4'sd1; end  // b = -14
      6'h33: begin m = 16'd48271; k = 4'sd1; end  // b = -13
      6'h34: begin m = 16'd44421; k = 4'sd1; end  // b = -12
      6'h35: begin m = 16'd40878; k = 4'sd1; end  // b = -11
      6'h36: begin m = 16'd37618; k = 4'sd1; end  // b = -10
      6'h37: begin m = 16'd34617; k = 4'sd1; end  // b = -9
      6'h38: begin m = 16'd63713; k = 4'sd0; end  // b = -8
      6'h39: begin m = 16'd58631; k = 4'sd0; end  // b = -7
      6'h3a: begin m = 16'd53955; k = 4'sd0; end  // b = -6
      6'h3b: begin m = 16'd49652; k = 4'sd0; end  // b = -5
      6'h3c: begin m = 16'd45692; k = 4'sd0; end  // b = -4
      6'h3d: begin m = 16'd42048; k = 4'sd0; end  // b = -3
      6'h3e: begin m = 16'd38694; k = 4'sd0; end  // b = -2
      6'h3f: begin m = 16'd35608; k = 4'sd0; end  // b = -1
      6'h00: begin m = 16'd32768; k = 4'sd0; end  // b = 0
      6'h01: begin m = 16'd60309; k = -4'sd1; end  // b = 1
      6'h02: begin m = 16'd55499; k = -4'sd1; end  // b = 2
      6'h03: begin m = 16'd51073; k = -4'sd1; end  // b = 3
      6'h04: begin m = 16'd46999; k = -4'sd1; end  // b = 4
      6'h05: begin m = 16'd43251; k = -4'sd1; end  // b = 5
      6'h06: begin m = 16'd39801; k = -4'sd1; end  // b = 6
      6'h07: begin m = 16'd36627; k = -4'sd1; end  // b = 7
      6'h08: begin m = 16'd33706; k = -4'sd1; end  // b = 8
      6'h09: begin m = 16'd62035; k = -4'sd2; end  // b = 9
      6'h0a: begin m = 16'd57087; k = -4'sd2; end  // b = 10
      6'h0b: begin m = 16'd52534; k = -4'sd2; end  // b = 11
      6'h0c: begin m = 16'd48344; k = -4'sd2; end  // b = 12
      6'h0d: begin m = 16'd44488; k = -4'sd2; end  // b = 13
      6'h0e: begin m = 16'd40940; k = -4'sd2; end  // b = 14
      6'h0f: begin m = 16'd37675; k = -4'sd2; end  // b = 15
      6'h10: begin m = 16'd34670; k = -4'sd2; end  // b = 16
      6'h11: begin m = 16'd63810; k = -4'sd3; end  // b = 17
      6'h12: begin m = 16'd58721; k = -4'sd3; end  // b = 18
      6'h13: begin m = 16'd54037; k = -4'sd3; end  // b = 19
      6'h14: begin m = 16'd49728; k = -4'sd3; end  // b = 20
      6'h15: begin m = 16'd45762; k = -4'sd3; end  // b = 21
      6'h16: begin m = 16'd42112; k = -4'sd3; end  // b = 22
      6'h17: begin m = 16'd38753; k = -4'sd3; end  // b = 23
      6'h18: begin m = 16'd35662; k = -4'sd3; end  // b = 24
      6'h19: begin m = 16'd32818; k = -4'sd3; end  // b = 25
      6'h1a: begin m = 16'd60401; k = -4'sd4; end  // b = 26
      6'h1b: begin m = 16'd55584; k = -4'sd4; end  // b = 27
      6'h1c: begin m = 16'd51151; k = -4'sd4; end  // b = 28
      6'h1d: begin m = 16'd47071; k = -4'sd4; end  // b = 29
      6'h1e: begin m = 16'd43317; k = -4'sd4; end  // b = 30
      6'h1f: begin m = 16'd39862; k = -4'sd4; end  // b = 31
      default: begin m = 16'd32768; k = 4'sd0; end
    endcase
    return '{m: m, k: k};
  endfunction

  // 2^a * D^b as an unsigned fixed-point number with f fraction bits,
  // truncated; all ones when it does not fit in 64 bits.
  function automatic logic [63:0] pow_fx(input int a, input logic signed [5:0] b,
                                         input int f);
    dpow_t d;
    int sh;
    d  = dpow(b);
    sh = a + int'(d.k) + f - 15;
    if (sh >= 48)       return '1;
    else if (sh >= 0)   return {48'd0, d.m} << sh;
    else if (sh <= -16) return '0;
    else                return {48'd0, d.m} >> (-sh);
  endfunction

  // Bus sources and the control word the controller drives each cycle.
  typedef enum logic [1:0] {S1_A, S1_PC, S1_INREG, S1_DMEM} s1_sel_e;
  typedef enum logic [1:0] {S2_B, S2_X2, S2_X1, S2_CONST} s2_sel_e;
  typedef enum logic [1:0] {D_ALU, D_MAC, D_BTC} dest_sel_e;

  typedef struct packed {
    s1_sel_e     s1_sel;
    s2_sel_e     s2_sel;
    logic [1:0]  ext_mode;    // X2 extender mode (see tlns_extender)
    logic [23:0] const2;      // constant the controller puts on S2
    alu_op_e     alu_op;
    dest_sel_e   dest_sel;
    logic        ab_load;     // latch register-file outputs into A and B
    logic        rf_we;
    logic [3:0]  rf_wa;
    logic        pc_inc;
    logic        pc_load;     // PC <- Dest bus
    logic        mar_load;    // MAR <- Dest bus
    logic        imem_en;
    logic        ifetch;      // imem address = next PC
    logic [23:0] imem_addr;   // imem address when not fetching
    logic        dmem_en;
    logic        dmem_we;
    logic        dmem_from_ctrl;  // dmem address from controller, else MAR
    logic [23:0] dmem_addr;
    logic        mac_valid;
    logic        mac_neg_high;
    logic        mac_clear;
    logic        mac_sel;
    logic        btc_load;
    logic        out_load;
    logic        halt;
  } ctrl_t;

endpackage
