// Binary-to-2DLNS converter (BTC). It turns a 24-bit two's-complement
// integer into a two-digit 2DLNS word by a greedy nearest-value search:
//   digit 1 is the single digit 2^a*D^b nearest to |x|, searched over all
//           b in [-16,15] with, for each b, the two exponents a that bracket
//           |x| (found by comparing the normalised mantissa of |x| with the
//           mantissa of D^b, so the search needs no shifter per candidate);
//   digit 2 is the digit nearest to the remaining error |x| - digit 1,
//           with the sign of x flipped when digit 1 overshoots.
// Values are compared as unsigned fixed-point numbers with BF fraction bits.
// Exponents a are limited to [-31,31]; a = -32 codes a zero digit (x = 0, or
// an exact first digit). The source design converts with range-addressable
// lookup tables whose contents it does not give; this search computes the
// same kind of nearest-value mapping without stored ranges.
//
// Timing: one register stage. x is sampled with load; the result is valid
// from the next cycle on (digit 1 and the residual are held in registers,
// digit 2 is computed from them).
module tlns_btc
  import tlns_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic [23:0] x,
  output tlns_t       y
);
  localparam int BF = 16;

  typedef struct packed {
    logic              zero;
    logic signed [5:0] a;
    logic signed [4:0] b;
    logic       [63:0] v;     // value of the digit, BF fraction bits
  } cand_t;

  // Nearest single digit to t (BF fraction bits). t is normalised to a
  // 1.23 mantissa tm at bit position pos. For each b the two candidate
  // values bracketing t are m_b and 2*m_b (or m_b/2 and m_b) at that same
  // position, so all 64 errors are compared as 25-bit mantissa differences;
  // only the winner is expanded to a full value.
  function automatic cand_t nearest(input logic [63:0] t);
    cand_t best;
    logic [24:0] err, best_err, lo, hi, tm, m;
    int pos, e, ac, best_a, best_b;
    logic found;
    dpow_t d;
    pos = 0;
    for (int i = 0; i < 64; i++) if (t[i]) pos = i;
    tm = (pos >= 23) ? 25'(t >> (pos - 23)) : 25'(t << (23 - pos));
    found = 1'b0; best_err = '1; best_a = 0; best_b = 0;
    for (int bi = -16; bi < 16; bi++) begin
      d = dpow(6'(bi));
      m = {1'b0, d.m, 8'd0};
      if (tm >= m) begin
        e = pos - BF; lo = m; hi = m << 1;
      end else begin
        e = pos - BF - 1; lo = m >> 1; hi = m;
      end
      for (int da = 0; da < 2; da++) begin
        ac  = e - int'(d.k) + da;
        err = (da == 0) ? tm - lo : hi - tm;
        if (ac >= -31 && ac <= 31 && err < best_err) begin
          best_err = err; best_a = ac; best_b = bi; found = 1'b1;
        end
      end
    end
    if (t == 0 || !found)
      best = '{zero: 1'b1, a: A_ZERO, b: 5'sd0, v: 64'd0};
    else
      best = '{zero: 1'b0, a: 6'(best_a), b: 5'(best_b), v: pow_fx(best_a, 6'(best_b), BF)};
    return best;
  endfunction

  logic        sx;
  logic [63:0] t;
  cand_t       c1, c2;
  assign sx = x[23];
  assign t  = {24'd0, (sx ? -x : x), 16'd0};
  assign c1 = nearest(t);

  // stage register: sign, digit 1 and residual
  logic        s_q, over_q;
  cand_t       c1_q;
  logic [63:0] r_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      s_q <= 1'b0; over_q <= 1'b0; r_q <= '0;
      c1_q <= '{zero: 1'b1, a: A_ZERO, b: 5'sd0, v: 64'd0};
    end else if (load) begin
      s_q    <= sx;
      c1_q   <= c1;
      over_q <= c1.v > t;
      r_q    <= (c1.v > t) ? c1.v - t : t - c1.v;
    end
  end

  assign c2 = nearest(r_q);

  always_comb begin
    y.d1 = '{s: s_q, a: c1_q.a, b: c1_q.b};
    y.d2 = '{s: s_q ^ over_q, a: c2.a, b: c2.b};
    if (c1_q.zero) y.d1 = '{s: 1'b0, a: A_ZERO, b: 5'sd0};
    if (c2.zero)   y.d2 = '{s: 1'b0, a: A_ZERO, b: 5'sd0};
  end
endmodule
