// 2DLNS-to-binary converter for one product digit. A product of two digits
// has sign s, binary exponent a (7 bits, the sum of two 6-bit exponents) and
// second-base exponent b (6 bits). The converter looks D^b up as a
// normalised mantissa m and power of two k (D^b = m*2^k, 64 entries of a
// table in tlns_pkg) and shifts m by a+k, giving |2^a*D^b| as an unsigned
// fixed-point number with FRAC fraction bits, truncated, and saturated to
// all ones when it does not fit in TBC_W bits. A zero digit gives 0.
// The source design names this unit; the table-and-shift structure is this
// design's choice. Purely combinational.
module tlns_tbc
  import tlns_pkg::*;
(
  input  logic              zero,
  input  logic              s,
  input  logic signed [6:0] a,
  input  logic signed [5:0] b,
  output logic              neg,
  output logic [TBC_W-1:0]  mag
);
  logic [63:0] full;
  assign full = pow_fx(int'(a), b, FRAC);
  assign neg  = s & ~zero;
  assign mag  = zero ? '0 : (|full[63:TBC_W]) ? '1 : full[TBC_W-1:0];
endmodule
