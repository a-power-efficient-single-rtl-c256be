// fp_addsub: single precision floating point adder/subtractor.
//
// With sub = 1 the sign of b is inverted first, so the unit always adds two
// signed values. Steps:
//   1. 8-bit comparator on the exponents and 24-bit comparator on the
//      mantissas (1.frac) decide which operand has the larger magnitude; the
//      operands are swapped so that X1 is the larger. Its exponent is the
//      initial result exponent.
//   2. 8-bit subtractor: exponent difference E1 - E2.
//   3. Alignment shifter: the smaller mantissa is shifted right by the
//      difference. It is kept with 26 extra low bits plus a sticky bit (the OR
//      of everything shifted further out), so the final truncation is exact.
//   4. Mantissa adder/subtractor (propagate/generate adder): add when the
//      signs are equal, subtract otherwise; X1 >= X2 so no negative result.
//   5. 32-bit leading zero detector on the top of the sum, and the
//      normaliser: shift left by the leading zero count, result exponent
//      E1 + 1 - count, mantissa truncated to 24 bits (round toward zero).
// Operands with exponent field 0 are zeros; an exact zero result is +0;
// exponent underflow flushes to zero and overflow saturates to infinity.
// The guard/sticky width, the truncation and those range rules are this
// design's choices. Combinational.
module fp_addsub
  import fp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);
  localparam int unsigned GW = 26;            // guard bits below the mantissa
  localparam int unsigned SW = 24 + GW + 1;   // sum width with carry bit

  fp32_t bb;
  assign bb = '{sign: b.sign ^ sub, exp: b.exp, frac: b.frac};

  logic [23:0] ma, mb;
  assign ma = {1'b1, a.frac};
  assign mb = {1'b1, bb.frac};

  // 1. comparators and swap
  logic e_gt, e_lt, e_eq, m_gt, m_lt, m_eq;
  rev_comparator #(.W(8))  u_ecmp (.a(a.exp), .b(bb.exp), .gt(e_gt), .lt(e_lt), .eq(e_eq));
  rev_comparator #(.W(24)) u_mcmp (.a(ma), .b(mb), .gt(m_gt), .lt(m_lt), .eq(m_eq));

  logic swap;
  assign swap = e_lt | (e_eq & m_lt);

  logic        s1, s2;
  logic [7:0]  e1, e2;
  logic [23:0] m1, m2;
  assign s1 = swap ? bb.sign : a.sign;
  assign s2 = swap ? a.sign  : bb.sign;
  assign e1 = swap ? bb.exp  : a.exp;
  assign e2 = swap ? a.exp   : bb.exp;
  assign m1 = swap ? mb : ma;
  assign m2 = swap ? ma : mb;

  // 2. exponent difference
  logic [7:0] ediff;
  logic       ed_cout;
  rev_pg_adder #(.W(8)) u_esub (.a(e1), .b(e2), .sub(1'b1), .sum(ediff), .cout(ed_cout));

  // 3. alignment with sticky bit
  logic [24+GW-1:0] m2_full, m2_shift, m2_lost;
  logic             sticky;
  always_comb begin
    m2_full  = {m2, GW'(0)};
    m2_shift = m2_full >> ediff;
    m2_lost  = m2_full & ~(m2_shift << ediff);
    if (ediff >= 8'(24 + GW)) m2_lost = m2_full;
    sticky   = |m2_lost;
  end

  // 4. mantissa add / subtract
  logic [SW-1:0] op1, op2, sum;
  logic          eff_sub, sum_cout;
  assign eff_sub = s1 ^ s2;
  assign op1     = {1'b0, m1, GW'(0)};
  assign op2     = {1'b0, m2_shift[24+GW-1:1], m2_shift[0] | sticky};
  rev_pg_adder #(.W(SW)) u_madd (.a(op1), .b(op2), .sub(eff_sub),
                                 .sum(sum), .cout(sum_cout));

  // 5. leading zero detection and normalisation
  logic [5:0] lz;
  logic       lz_zero;
  rev_lzd #(.W(32)) u_lzd (.d(sum[SW-1 -: 32]), .count(lz), .zero(lz_zero));

  logic [SW-1:0] norm;
  logic [9:0]    e_res;
  assign norm  = sum << lz;
  assign e_res = 10'(e1) + 10'd1 - 10'(lz);

  always_comb begin
    if (a.exp == '0 && bb.exp == '0)   y = FP_ZERO;
    else if (bb.exp == '0)             y = a;
    else if (a.exp == '0)              y = bb;
    else if (sum == '0)                y = FP_ZERO;
    else if (e_res[9] || e_res == '0)  y = '{sign: s1, exp: '0, frac: '0};
    else if (e_res >= 10'd255)         y = fp_inf(s1);
    else                               y = '{sign: s1, exp: e_res[7:0], frac: norm[SW-2 -: 23]};
  end

  logic unused;
  assign unused = ^{ed_cout, sum_cout, lz_zero, m_gt, m_eq, e_gt, norm[SW-25:0], norm[SW-1]};
endmodule
