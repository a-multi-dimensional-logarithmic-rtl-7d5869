// Testbench helpers for the 2DLNS CPU: a real-valued reference for 2DLNS
// words (independent of the RTL's fixed-point tables) and an instruction
// encoder for writing test programs.
package tlns_tb_pkg;
  localparam real D = 0.92024380912663017;

  function automatic real digit_real(input logic [11:0] d);
    int a, b;
    real v;
    a = int'($signed(d[10:5]));
    b = int'($signed(d[4:0]));
    if (a == -32) return 0.0;
    v = $pow(2.0, real'(a)) * $pow(D, real'(b));
    return d[11] ? -v : v;
  endfunction

  function automatic real word_real(input logic [23:0] w);
    return digit_real(w[23:12]) + digit_real(w[11:0]);
  endfunction

  // instruction encoders (field layout of the CPU)
  function automatic logic [23:0] enc_r(input logic [5:0] fn, input int rs1, input int rs2, input int rd);
    return {6'h00, 4'(rs1), 4'(rs2), 4'(rd), fn};
  endfunction
  function automatic logic [23:0] enc_i(input logic [5:0] op, input int rs, input int rd, input int imm);
    return {op, 4'(rs), 4'(rd), 10'(imm)};
  endfunction
  function automatic logic [23:0] enc_j(input logic [5:0] op, input int imm);
    return {op, 18'(imm)};
  endfunction
  function automatic logic [23:0] enc_filter(input int rs1, input int rs2, input logic [1:0] fsym,
                                             input logic csym, input int order);
    return {6'h15, 4'(rs1), 4'(rs2), fsym, csym, 7'(order)};
  endfunction

  // random 2DLNS word of magnitude roughly 2^amin .. 2^amax
  function automatic logic [23:0] rand_word(input int amin, input int amax);
    logic [11:0] d1, d2;
    int a1, a2;
    a1 = amin + int'($urandom_range(0, amax - amin));
    a2 = a1 - 6 - int'($urandom_range(0, 6));
    if (a2 < -31) a2 = -31;
    d1 = {1'($urandom), 6'(a1), 5'($urandom)};
    d2 = {1'($urandom), 6'(a2), 5'($urandom)};
    if ($urandom_range(0, 7) == 0) d2 = 12'h400;   // zero second digit
    return {d1, d2};
  endfunction

  // nearest two-digit 2DLNS word to a real value: the first digit is the
  // closest single digit, the second the closest digit to what remains
  function automatic logic [11:0] near_digit(input real x);
    real ax, best, v, e;
    int a, ba, bb;
    logic [11:0] d;
    ax = (x < 0) ? -x : x;
    d = 12'h400; best = ax;
    if (ax == 0.0) return d;
    for (int b = -16; b <= 15; b++) begin
      a = int'($floor($ln(ax / $pow(D, real'(b))) / $ln(2.0) + 0.5));
      if (a < -31) a = -31;
      if (a > 31) a = 31;
      v = $pow(2.0, real'(a)) * $pow(D, real'(b));
      e = (ax > v) ? ax - v : v - ax;
      if (e < best) begin best = e; d = {x < 0, 6'(a), 5'(b)}; end
    end
    return d;
  endfunction

  function automatic logic [23:0] enc_real(input real x);
    logic [11:0] d1;
    d1 = near_digit(x);
    return {d1, near_digit(x - digit_real(d1))};
  endfunction
endpackage
