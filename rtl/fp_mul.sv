// fp_mul: single precision floating point multiplier, one combinational pass
// (the result is available within one clock cycle).
//
//   sign      : a.sign XOR b.sign (reversible XOR, Feynman gate)
//   exponent  : 8-bit propagate/generate adder a.exp + b.exp (carry kept),
//               then bias subtractor (-127); +1 when the product needs a
//               one-bit right normalisation
//   mantissa  : 24 x 24 operand-decomposition multiplier of 1.a_frac and
//               1.b_frac; the 48-bit product lies in [1, 4) and the shifter
//               picks P[46:24] when P[47] is set (shift right by one) and
//               P[45:23] otherwise. The product is truncated to 24 bits.
// Normal operands only: an exponent field of 0 is taken as zero and gives a
// zero result; a result exponent below 1 is flushed to zero and one above 254
// saturates to infinity. Those range rules and the truncation (rather than
// rounding) are this design's choices.
module fp_mul
  import fp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t p
);
  // sign bit calculation
  logic s_res, s_garbage;
  rev_feynman u_sign (.a(a.sign), .b(b.sign), .p(s_garbage), .q(s_res));

  // exponent unit: RPGA then RBS
  logic [7:0] e_sum;
  logic       e_cout;
  rev_pg_adder #(.W(8)) u_rpga (.a(a.exp), .b(b.exp), .sub(1'b0),
                                .sum(e_sum), .cout(e_cout));

  logic [9:0] e_unb;
  logic       rbs_cout;
  rev_pg_adder #(.W(10)) u_rbs (.a({1'b0, e_cout, e_sum}), .b(10'(BIAS)),
                                .sub(1'b1), .sum(e_unb), .cout(rbs_cout));

  // mantissa multiplier
  logic [47:0] prod;
  rev_mult_24x24 #(.W(24)) u_mult (.a({1'b1, a.frac}), .b({1'b1, b.frac}),
                                   .p(prod));

  // 47-bit normalising shifter and exponent adjust
  logic [22:0] frac_n;
  logic [9:0]  e_fin;
  assign frac_n = prod[47] ? prod[46:24] : prod[45:23];
  assign e_fin  = e_unb + 10'(prod[47]);

  always_comb begin
    if (a.exp == '0 || b.exp == '0)          p = '{sign: s_res, exp: '0, frac: '0};
    else if (e_fin[9] || e_fin == '0)        p = '{sign: s_res, exp: '0, frac: '0};
    else if (e_fin >= 10'd255)               p = fp_inf(s_res);
    else                                     p = '{sign: s_res, exp: e_fin[7:0], frac: frac_n};
  end

  logic unused;
  assign unused = ^{s_garbage, rbs_cout, prod[22:0]};
endmodule
