// Controller of the 2DLNS CPU: a state machine that steps every instruction
// through fetch, decode and one or more execute states, and drives every
// select, load and enable of the datapath through one control word (ctrl_t).
//
// Instruction flow (cycles counted from the decode state; the fetch of the
// next instruction overlaps the last cycle of the current one):
//   ALU, set, lhi, inpt, oupt, branch, j, jr, nop      2 cycles
//   sw, btc, jal, jalr                                 3 cycles
//   lw, tbc, mult, mac                                 4 cycles
//   filter of order N                                  N+7 cycles
//                                                       (82 for N = 75)
// DECODE latches the instruction (IR) and the two register-file outputs
// A and B and increments PC. Branch and jump targets are PC+1+offset,
// computed by the ALU with PC on S1 and the extended offset on S2.
//
// filter rs1, rs2, filter_sym, coef_sym, order: rs1 holds the newest data
// address in bits [23:14] and the coefficient start address in bits [13:0];
// rs2 holds the end and start of the circular data buffer in the same
// positions. For tap i = 0..order the controller reads data word
// addr-i (wrapping from the buffer start to its end) from data memory and
// coefficient cbase+i, or cbase+min(i, order-i) when coef_sym is set, from
// instruction memory, one tap per cycle, into the MAC. filter_sym[0] says a
// dual filter is computed as well; filter_sym[1] selects which taps the dual
// negates (0: odd taps, 1: even taps). The results go to r12 (filter) and,
// with a dual, r13 (dual). These field meanings follow the source's field
// names and example program; the bit positions, the buffer direction and
// the fixed result registers are this design's reading of them.
module tlns_controller
  import tlns_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [23:0] imem_data,
  input  logic [23:0] a_val,
  input  logic [23:0] b_val,
  output ctrl_t       ctrl,
  output logic [23:0] ir
);
  typedef enum logic [3:0] {
    S_FETCH, S_DECODE, S_EXEC, S_MEM, S_WB, S_JL2, S_M1, S_M2,
    S_F_RUN, S_F_D1, S_F_D2, S_F_WLO, S_F_WHI, S_HALT
  } state_e;

  state_e state, state_n;

  // filter sequencing registers
  logic [23:0] daddr, dstart, dend, cbase;
  logic [6:0]  tap, order;
  logic        rd_v, rd_neg;        // a tap was issued last cycle
  logic        dual, odd_type, csym;

  opcode_e op;
  func_e   fn;
  logic [3:0] f2, rd;
  assign op = opcode_e'(ir[23:18]);
  assign fn = func_e'(ir[5:0]);
  assign f2 = ir[13:10];
  assign rd = ir[9:6];

  logic a_zero;
  assign a_zero = (a_val == '0);

  // coefficient index of the current tap
  logic [6:0] cidx;
  assign cidx = (csym && (tap > order - tap)) ? order - tap : tap;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_FETCH;
      ir    <= '0;
      daddr <= '0; dstart <= '0; dend <= '0; cbase <= '0;
      tap   <= '0; order  <= '0;
      rd_v  <= 1'b0; rd_neg <= 1'b0;
      dual  <= 1'b0; odd_type <= 1'b0; csym <= 1'b0;
    end else begin
      state  <= state_n;
      rd_v   <= 1'b0;
      rd_neg <= 1'b0;
      if (state == S_DECODE) ir <= imem_data;
      if (state == S_EXEC && op == OP_FILTER) begin
        daddr    <= {14'd0, a_val[23:14]};
        cbase    <= {10'd0, a_val[13:0]};
        dend     <= {14'd0, b_val[23:14]};
        dstart   <= {10'd0, b_val[13:0]};
        order    <= ir[6:0];
        csym     <= ir[7];
        dual     <= ir[8];
        odd_type <= ir[9];
        tap      <= '0;
      end
      if (state == S_F_RUN) begin
        tap    <= tap + 7'd1;
        daddr  <= (daddr == dstart) ? dend : daddr - 24'd1;
        rd_v   <= 1'b1;
        rd_neg <= dual & (tap[0] ^ odd_type);
      end
    end
  end

  // defaults: nothing happens
  function automatic ctrl_t idle();
    ctrl_t c;
    c = '0;
    c.s1_sel   = S1_A;
    c.s2_sel   = S2_B;
    c.alu_op   = ALU_ADD;
    c.dest_sel = D_ALU;
    return c;
  endfunction

  // ALU operation, S2 source and extender mode of an ALU-class instruction
  function automatic logic alu_class(input opcode_e o, input func_e f,
                                     output alu_op_e aop, output s2_sel_e s2,
                                     output logic [1:0] em);
    logic ok;
    ok = 1'b1; s2 = S2_X2; em = 2'd0; aop = ALU_ADD;
    unique case (o)
      OP_SPECIAL: begin
        s2 = S2_B;
        unique case (f)
          F_ADD, F_ADDU: aop = ALU_ADD;
          F_SUB, F_SUBU: aop = ALU_SUB;
          F_AND:  aop = ALU_AND;
          F_OR:   aop = ALU_OR;
          F_XOR:  aop = ALU_XOR;
          F_SLL:  aop = ALU_SLL;
          F_SRL:  aop = ALU_SRL;
          F_SRA:  aop = ALU_SRA;
          F_SEQ, F_SEQU: aop = ALU_SEQ;
          F_SNE, F_SNEU: aop = ALU_SNE;
          F_SLT:  aop = ALU_SLT;
          F_SGT:  aop = ALU_SGT;
          F_SLE:  aop = ALU_SLE;
          F_SGE:  aop = ALU_SGE;
          F_SLTU: aop = ALU_SLTU;
          F_SGTU: aop = ALU_SGTU;
          F_SLEU: aop = ALU_SLEU;
          F_SGEU: aop = ALU_SGEU;
          default: ok = 1'b0;
        endcase
      end
      OP_ADDI:  aop = ALU_ADD;
      OP_ADDUI: begin aop = ALU_ADD; em = 2'd1; end
      OP_SUBI:  aop = ALU_SUB;
      OP_SUBUI: begin aop = ALU_SUB; em = 2'd1; end
      OP_ANDI:  begin aop = ALU_AND; em = 2'd1; end
      OP_ORI:   begin aop = ALU_OR;  em = 2'd1; end
      OP_XORI:  begin aop = ALU_XOR; em = 2'd1; end
      OP_LHI:   begin aop = ALU_LHI; em = 2'd1; end
      OP_SLLI:  aop = ALU_SLL;
      OP_SRLI:  aop = ALU_SRL;
      OP_SRAI:  aop = ALU_SRA;
      OP_SEQI:  aop = ALU_SEQ;
      OP_SNEI:  aop = ALU_SNE;
      OP_SLTI:  aop = ALU_SLT;
      OP_SGTI:  aop = ALU_SGT;
      OP_SLEI:  aop = ALU_SLE;
      OP_SGEI:  aop = ALU_SGE;
      OP_SEQUI: begin aop = ALU_SEQ;  em = 2'd1; end
      OP_SNEUI: begin aop = ALU_SNE;  em = 2'd1; end
      OP_SLTUI: begin aop = ALU_SLTU; em = 2'd1; end
      OP_SGTUI: begin aop = ALU_SGTU; em = 2'd1; end
      OP_SLEUI: begin aop = ALU_SLEU; em = 2'd1; end
      OP_SGEUI: begin aop = ALU_SGEU; em = 2'd1; end
      default: ok = 1'b0;
    endcase
    return ok;
  endfunction

  always_comb begin
    alu_op_e    aop;
    s2_sel_e    s2;
    logic [1:0] em;
    aop     = ALU_ADD;
    s2      = S2_B;
    em      = 2'd0;
    ctrl    = idle();
    state_n = state;
    unique case (state)
      S_FETCH: begin
        ctrl.imem_en = 1'b1;
        ctrl.ifetch  = 1'b1;
        state_n      = S_DECODE;
      end
      S_DECODE: begin
        ctrl.ab_load = 1'b1;
        ctrl.pc_inc  = 1'b1;
        state_n      = S_EXEC;
      end
      S_EXEC: begin
        // most instructions end here and fetch the next one
        ctrl.imem_en = 1'b1;
        ctrl.ifetch  = 1'b1;
        state_n      = S_DECODE;
        if (alu_class(op, fn, aop, s2, em)) begin
          ctrl.alu_op   = aop;
          ctrl.s2_sel   = s2;
          ctrl.ext_mode = em;
          ctrl.rf_we    = 1'b1;
          ctrl.rf_wa    = (op == OP_SPECIAL) ? rd : f2;
        end else begin
          unique case (op)
            OP_SPECIAL: begin
              if (fn == F_MULT || fn == F_MAC) begin
                ctrl.imem_en   = 1'b0;
                ctrl.ifetch    = 1'b0;
                ctrl.mac_valid = 1'b1;
                state_n        = S_M1;
              end
            end
            OP_TBC: begin
              ctrl.imem_en   = 1'b0;
              ctrl.ifetch    = 1'b0;
              ctrl.s2_sel    = S2_CONST;
              ctrl.const2    = TLNS_ONE;
              ctrl.mac_valid = 1'b1;
              state_n        = S_M1;
            end
            OP_BEQZ, OP_BNEZ: begin
              ctrl.s1_sel   = S1_PC;
              ctrl.s2_sel   = S2_X2;
              ctrl.ext_mode = 2'd0;
              ctrl.pc_load  = (op == OP_BEQZ) ? a_zero : !a_zero;
            end
            OP_J: begin
              ctrl.s1_sel   = S1_PC;
              ctrl.s2_sel   = S2_X2;
              ctrl.ext_mode = 2'd2;
              ctrl.pc_load  = 1'b1;
            end
            OP_JR: begin
              ctrl.s2_sel  = S2_CONST;
              ctrl.pc_load = 1'b1;
            end
            OP_JAL, OP_JALR: begin
              ctrl.imem_en = 1'b0;
              ctrl.ifetch  = 1'b0;
              ctrl.s1_sel  = S1_PC;
              ctrl.s2_sel  = S2_CONST;
              ctrl.rf_we   = 1'b1;
              ctrl.rf_wa   = 4'd15;
              state_n      = S_JL2;
            end
            OP_LW, OP_SW: begin
              ctrl.imem_en  = 1'b0;
              ctrl.ifetch   = 1'b0;
              ctrl.s2_sel   = S2_X2;
              ctrl.mar_load = 1'b1;
              state_n       = S_MEM;
            end
            OP_INPT: begin
              ctrl.s1_sel = S1_INREG;
              ctrl.s2_sel = S2_CONST;
              ctrl.rf_we  = 1'b1;
              ctrl.rf_wa  = f2;
            end
            OP_OUPT: begin
              ctrl.s2_sel   = S2_B;
              ctrl.out_load = 1'b1;
            end
            OP_BTC: begin
              ctrl.imem_en  = 1'b0;
              ctrl.ifetch   = 1'b0;
              ctrl.btc_load = 1'b1;
              state_n       = S_WB;
            end
            OP_FILTER: begin
              ctrl.imem_en  = 1'b0;
              ctrl.ifetch   = 1'b0;
              ctrl.mac_clear = 1'b1;
              state_n       = S_F_RUN;
            end
            OP_HALT: begin
              ctrl.imem_en = 1'b0;
              ctrl.ifetch  = 1'b0;
              state_n      = S_HALT;
            end
            default: ;   // nop and unused codes
          endcase
        end
      end
      S_MEM: begin
        ctrl.dmem_en = 1'b1;
        if (op == OP_SW) begin
          ctrl.dmem_we = 1'b1;
          ctrl.alu_op  = ALU_PASS_B;
          ctrl.imem_en = 1'b1;
          ctrl.ifetch  = 1'b1;
          state_n      = S_DECODE;
        end else begin
          state_n      = S_WB;
        end
      end
      S_WB: begin
        // lw: Dest <- data memory word; btc: Dest <- converter output
        ctrl.s1_sel   = S1_DMEM;
        ctrl.s2_sel   = S2_CONST;
        ctrl.dest_sel = (op == OP_BTC) ? D_BTC : D_ALU;
        ctrl.rf_we    = 1'b1;
        ctrl.rf_wa    = f2;
        ctrl.imem_en  = 1'b1;
        ctrl.ifetch   = 1'b1;
        state_n       = S_DECODE;
      end
      S_JL2: begin
        ctrl.pc_load = 1'b1;
        if (op == OP_JAL) begin
          ctrl.s1_sel   = S1_PC;
          ctrl.s2_sel   = S2_X2;
          ctrl.ext_mode = 2'd2;
        end else begin
          ctrl.s2_sel   = S2_CONST;
        end
        ctrl.imem_en = 1'b1;
        ctrl.ifetch  = 1'b1;
        state_n      = S_DECODE;
      end
      S_M1: begin
        // product reaches the accumulator; mult and tbc start from zero
        ctrl.mac_clear = (op != OP_SPECIAL) || (fn == F_MULT);
        state_n        = S_M2;
      end
      S_M2: begin
        ctrl.dest_sel = D_MAC;
        ctrl.rf_we    = 1'b1;
        ctrl.rf_wa    = (op == OP_SPECIAL) ? rd : f2;
        ctrl.imem_en  = 1'b1;
        ctrl.ifetch   = 1'b1;
        state_n       = S_DECODE;
      end
      S_F_RUN: begin
        ctrl.imem_en        = 1'b1;
        ctrl.imem_addr      = cbase + 24'(cidx);
        ctrl.dmem_en        = 1'b1;
        ctrl.dmem_from_ctrl = 1'b1;
        ctrl.dmem_addr      = daddr;
        if (tap == order) state_n = S_F_D1;
      end
      S_F_D1: state_n = S_F_D2;
      S_F_D2: state_n = S_F_WLO;
      S_F_WLO: begin
        ctrl.dest_sel = D_MAC;
        ctrl.mac_sel  = 1'b0;
        ctrl.rf_we    = 1'b1;
        ctrl.rf_wa    = 4'd12;
        if (dual) begin
          state_n = S_F_WHI;
        end else begin
          ctrl.imem_en = 1'b1;
          ctrl.ifetch  = 1'b1;
          state_n      = S_DECODE;
        end
      end
      S_F_WHI: begin
        ctrl.dest_sel = D_MAC;
        ctrl.mac_sel  = 1'b1;
        ctrl.rf_we    = 1'b1;
        ctrl.rf_wa    = 4'd13;
        ctrl.imem_en  = 1'b1;
        ctrl.ifetch   = 1'b1;
        state_n       = S_DECODE;
      end
      S_HALT: begin
        ctrl.halt = 1'b1;
      end
      default: state_n = S_FETCH;
    endcase

    // taps issued last cycle: memory words are on the buses now
    if (rd_v) begin
      ctrl.s1_sel       = S1_DMEM;
      ctrl.s2_sel       = S2_X1;
      ctrl.mac_valid    = 1'b1;
      ctrl.mac_neg_high = rd_neg;
    end
  end
endmodule
