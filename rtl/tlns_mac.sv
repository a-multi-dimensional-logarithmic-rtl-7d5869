// 2DLNS multiply-accumulate unit.
//
// x and y are two-digit 2DLNS words. The four digit products
// x.di*y.dj are formed in the logarithmic domain (sign XOR, exponent
// additions), each is converted to a binary magnitude by a tlns_tbc, and a
// two-level add/subtract tree, steered by the product signs and one bit wider
// per level, forms the signed binary product. That product is registered
// (stage 1) and then added to two accumulators (stage 2):
//   Low-Acc  accumulates every product,
//   High-Acc accumulates the product negated when neg_high is set, which the
//            controller drives from the coefficient number and the filter's
//            symmetry type, so one pass computes a filter and its dual whose
//            every other coefficient is negated.
// High-Reg follows High-Acc and sel picks Low-Acc (0) or High-Reg (1) for
// the result, an integer: the accumulator shifted right by FRAC, truncated
// to 24 bits. This structure follows the source's MAC diagram; the stage-1
// register, the fixed-point format and the widths are this design's choices.
//
// Timing: products presented with in_valid in cycle t reach the
// accumulators at the end of cycle t+1. clear zeroes both accumulators at the
// clock edge (a stage-2 product in the same cycle is then the new value).
module tlns_mac
  import tlns_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  tlns_t       x,
  input  tlns_t       y,
  input  logic        in_valid,
  input  logic        neg_high,
  input  logic        clear,
  input  logic        sel,
  output logic [23:0] result,
  output logic signed [ACC_W-1:0] low_acc,
  output logic signed [ACC_W-1:0] high_acc
);
  localparam int L1_W = TBC_W + 2;   // signed sum of two magnitudes
  localparam int L2_W = TBC_W + 3;

  digit_t xd [2];
  digit_t yd [2];
  assign xd[0] = x.d1;
  assign xd[1] = x.d2;
  assign yd[0] = y.d1;
  assign yd[1] = y.d2;

  logic             pneg [4];
  logic [TBC_W-1:0] pmag [4];

  for (genvar i = 0; i < 2; i++) begin : g_x
    for (genvar j = 0; j < 2; j++) begin : g_y
      tlns_tbc u_tbc (
        .zero (xd[i].a == A_ZERO || yd[j].a == A_ZERO),
        .s    (xd[i].s ^ yd[j].s),
        .a    (7'(xd[i].a) + 7'(yd[j].a)),
        .b    (6'(yd[j].b) + 6'(xd[i].b)),
        .neg  (pneg[2*i+j]),
        .mag  (pmag[2*i+j])
      );
    end
  end

  function automatic logic signed [L1_W-1:0] addsub(input logic na, input logic [TBC_W-1:0] ma,
                                                    input logic nb, input logic [TBC_W-1:0] mb);
    logic signed [L1_W-1:0] va, vb;
    va = na ? -L1_W'(ma) : L1_W'(ma);
    vb = nb ? -L1_W'(mb) : L1_W'(mb);
    return va + vb;
  endfunction

  logic signed [L1_W-1:0] sum01, sum23;
  logic signed [L2_W-1:0] psum;
  assign sum01 = addsub(pneg[0], pmag[0], pneg[1], pmag[1]);
  assign sum23 = addsub(pneg[2], pmag[2], pneg[3], pmag[3]);
  assign psum  = L2_W'(sum01) + L2_W'(sum23);

  // stage 1
  logic signed [L2_W-1:0] p_q;
  logic                   v_q, nh_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      p_q <= '0; v_q <= 1'b0; nh_q <= 1'b0;
    end else begin
      p_q <= psum; v_q <= in_valid; nh_q <= neg_high;
    end
  end

  // stage 2
  logic signed [ACC_W-1:0] p_ext, low_base, high_base, high_reg;
  assign p_ext     = ACC_W'(p_q);
  assign low_base  = clear ? '0 : low_acc;
  assign high_base = clear ? '0 : high_acc;
  always_ff @(posedge clk) begin
    if (rst) begin
      low_acc <= '0; high_acc <= '0; high_reg <= '0;
    end else if (v_q) begin
      low_acc  <= low_base + p_ext;
      high_acc <= nh_q ? high_base - p_ext : high_base + p_ext;
      high_reg <= nh_q ? high_base - p_ext : high_base + p_ext;
    end else if (clear) begin
      low_acc <= '0; high_acc <= '0; high_reg <= '0;
    end
  end

  logic signed [ACC_W-1:0] chosen;
  assign chosen = sel ? high_reg : low_acc;
  assign result = chosen[FRAC +: 24];
endmodule
