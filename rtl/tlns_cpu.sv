// 24-bit RISC CPU working on two-digit two-dimensional logarithmic (2DLNS)
// numbers as well as on ordinary integers.
//
// Organisation: a register file (16 x 24 bits) feeds registers A and B; two
// source buses S1 and S2 carry operands to the ALU, the MAC (2DLNS multiply
// and binary accumulate), the binary-to-2DLNS converter (BTC), the output
// register and the data-memory write path, and one Dest bus carries the
// result back to the register file, PC or MAR. S1 takes A, PC, the input
// register or a data-memory word; S2 takes B, the extended immediate (X2),
// a word passed straight from instruction memory (X1, the filter
// coefficients) or a controller constant (const2). Instruction memory is
// addressed by PC or by the controller, data memory by MAR or by the
// controller; both memories are outside this module (synchronous read, one
// cycle). All of this follows the source's organisation diagram; which bus
// each extender drives is this design's choice.
//
// Ports follow the source's external port list. Input_data is sampled into
// the input register every cycle; oupt loads the output register and raises
// Output_enable for the following cycle. halt stays high after a halt
// instruction until reset. ifetch is high in cycles that fetch an
// instruction. Reset is synchronous and active high; the first fetch is
// from address 0. Assertions check the memory-port rules: a fetch enables
// instruction memory, a data write enables data memory, and a halted CPU
// leaves both memories idle.
module tlns_cpu
  import tlns_pkg::*;
#(
  parameter int IMEM_AW = 10,
  parameter int DMEM_AW = 10
) (
  input  logic               clk,
  input  logic               reset,
  input  logic [23:0]        Input_data,
  output logic               halt,
  output logic               ifetch,
  output logic [23:0]        Output_data,
  output logic               Output_enable,
  input  logic [23:0]        Ir_mem_read_data,
  output logic [IMEM_AW-1:0] Ir_mem_address,
  output logic               Ir_mem_en,
  input  logic [23:0]        Data_mem_read_data,
  output logic [DMEM_AW-1:0] Data_mem_address,
  output logic [23:0]        Data_mem_write_data,
  output logic               Data_mem_en,
  output logic               Data_mem_write_en
);
  ctrl_t       c;
  logic [23:0] ir;
  logic [23:0] rf_qa, rf_qb, a_q, b_q, pc_q, mar_q, in_q, out_q;
  logic [23:0] s1, s2, dest, alu_y, mac_y, x1_y, x2_y;
  tlns_t       btc_y;
  logic        oe_q;

  tlns_controller u_ctrl (
    .clk       (clk),
    .rst       (reset),
    .imem_data (Ir_mem_read_data),
    .a_val     (a_q),
    .b_val     (b_q),
    .ctrl      (c),
    .ir        (ir)
  );

  // register file is read with the fields of the word arriving from memory
  tlns_regfile #(.NREGS(16), .WIDTH(24)) u_rf (
    .clk (clk),
    .rst (reset),
    .ra  (Ir_mem_read_data[17:14]),
    .rb  (Ir_mem_read_data[13:10]),
    .qa  (rf_qa),
    .qb  (rf_qb),
    .we  (c.rf_we),
    .wa  (c.rf_wa),
    .wd  (dest)
  );

  tlns_extender u_x1 (.mode(2'd3),       .word(Ir_mem_read_data), .y(x1_y));
  tlns_extender u_x2 (.mode(c.ext_mode), .word(ir),               .y(x2_y));

  always_comb begin
    unique case (c.s1_sel)
      S1_A:     s1 = a_q;
      S1_PC:    s1 = pc_q;
      S1_INREG: s1 = in_q;
      default:  s1 = Data_mem_read_data;
    endcase
    unique case (c.s2_sel)
      S2_B:    s2 = b_q;
      S2_X2:   s2 = x2_y;
      S2_X1:   s2 = x1_y;
      default: s2 = c.const2;
    endcase
  end

  tlns_alu #(.WIDTH(24)) u_alu (.op(c.alu_op), .a(s1), .b(s2), .y(alu_y));

  tlns_mac u_mac (
    .clk      (clk),
    .rst      (reset),
    .x        (tlns_t'(s1)),
    .y        (tlns_t'(s2)),
    .in_valid (c.mac_valid),
    .neg_high (c.mac_neg_high),
    .clear    (c.mac_clear),
    .sel      (c.mac_sel),
    .result   (mac_y),
    .low_acc  (),
    .high_acc ()
  );

  tlns_btc u_btc (.clk(clk), .rst(reset), .load(c.btc_load), .x(s1), .y(btc_y));

  always_comb begin
    unique case (c.dest_sel)
      D_MAC:   dest = mac_y;
      D_BTC:   dest = btc_y;
      default: dest = alu_y;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      a_q <= '0; b_q <= '0; pc_q <= '0; mar_q <= '0;
      in_q <= '0; out_q <= '0; oe_q <= 1'b0;
    end else begin
      in_q <= Input_data;
      if (c.ab_load) begin
        a_q <= rf_qa;
        b_q <= rf_qb;
      end
      if (c.pc_load)     pc_q <= dest;
      else if (c.pc_inc) pc_q <= pc_q + 24'd1;
      if (c.mar_load) mar_q <= dest;
      if (c.out_load) out_q <= s2;
      oe_q <= c.out_load;
    end
  end

  logic [23:0] fetch_addr;
  assign fetch_addr = c.pc_load ? dest : pc_q;

  assign Ir_mem_en           = c.imem_en;
  assign Ir_mem_address      = c.ifetch ? fetch_addr[IMEM_AW-1:0] : c.imem_addr[IMEM_AW-1:0];
  assign ifetch              = c.ifetch;
  assign Data_mem_en         = c.dmem_en;
  assign Data_mem_write_en   = c.dmem_we;
  assign Data_mem_address    = c.dmem_from_ctrl ? c.dmem_addr[DMEM_AW-1:0] : mar_q[DMEM_AW-1:0];
  assign Data_mem_write_data = dest;
  assign Output_data         = out_q;
  assign Output_enable       = oe_q;
  assign halt                = c.halt;

  // memory-port rules
  a_fetch_en:  assert property (@(posedge clk) disable iff (reset) ifetch |-> Ir_mem_en);
  a_write_en:  assert property (@(posedge clk) disable iff (reset) Data_mem_write_en |-> Data_mem_en);
  a_halt_idle: assert property (@(posedge clk) disable iff (reset) halt |-> !Ir_mem_en && !Data_mem_en);
endmodule
