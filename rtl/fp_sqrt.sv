// fp_sqrt: single precision floating point square root.
//
// Sign: passed through (a negative input has no real root; the result then
// carries the sign bit and the magnitude of the root of |x|, a choice of this
// design). Exponent: with the biased exponent e, the result exponent is
// ((e + 1) >> 1) + 63, which equals 127 + floor((e - 127) / 2). Significand:
// the 23 stored bits are extended to 25 bits by prepending 01, and shifted one
// bit left when the unbiased exponent is odd (biased exponent even), so the
// radicand n[24:0] lies in [2^23, 2^25). The root is then computed in parallel
// form by a chain of unsigned square-root units:
//   n[24:13] 12-bit unit -> Q[23:18]
//   n[12:7]   6-bit unit -> Q[17:15]
//   n[6:3]    4-bit unit -> Q[14:13]
//   n[2:0]    3-bit unit -> Q[12:10] (zeros appended)
//   ten 1-bit units, a zero appended in each -> Q[9:0]
// Q[23:0] = floor(sqrt(n * 2^23)); Q[23] is always 1 and Q[22:0] becomes the
// result's trailing significand (truncated root). Zero in gives zero out.
// Purely combinational.
module fp_sqrt
  import fp_pkg::*;
(
  input  fp32_t a,
  output fp32_t y
);
  localparam int unsigned REM_W = 28;

  logic [8:0]  e_inc;
  logic [7:0]  e_res;
  logic [24:0] n_ext, n;

  // exponent: 8-bit adders (propagate/generate) and a one-bit right shift
  logic [7:0] e_inc_lo;
  logic       e_inc_c, e_res_c;
  rev_pg_adder #(.W(8)) u_einc (.a(a.exp), .b(8'd1), .sub(1'b0),
                                .sum(e_inc_lo), .cout(e_inc_c));       // e + 1
  assign e_inc = {e_inc_c, e_inc_lo};
  rev_pg_adder #(.W(8)) u_eres (.a(e_inc[8:1]), .b(8'd63), .sub(1'b0),
                                .sum(e_res), .cout(e_res_c));          // (e >> 1) + 63
  assign n_ext = {2'b01, a.frac};
  assign n     = a.exp[0] ? n_ext : (n_ext << 1); // shift 0 or 1 bit left

  logic [REM_W-1:0] rem  [14];
  logic [23:0]      root [14];

  rev_usqrt_unit #(.IN_BITS(12), .STEPS(6), .REM_W(REM_W)) u_sq12 (
    .radicand(n[24:13]), .rem_in('0), .root_in('0),
    .rem_out(rem[0]), .root_out(root[0]));
  rev_usqrt_unit #(.IN_BITS(6), .STEPS(3), .REM_W(REM_W)) u_sq6 (
    .radicand(n[12:7]), .rem_in(rem[0]), .root_in(root[0]),
    .rem_out(rem[1]), .root_out(root[1]));
  rev_usqrt_unit #(.IN_BITS(4), .STEPS(2), .REM_W(REM_W)) u_sq4 (
    .radicand(n[6:3]), .rem_in(rem[1]), .root_in(root[1]),
    .rem_out(rem[2]), .root_out(root[2]));
  rev_usqrt_unit #(.IN_BITS(3), .STEPS(3), .REM_W(REM_W)) u_sq3 (
    .radicand(n[2:0]), .rem_in(rem[2]), .root_in(root[2]),
    .rem_out(rem[3]), .root_out(root[3]));

  for (genvar k = 0; k < 10; k++) begin : g_sq1
    rev_usqrt_unit #(.IN_BITS(1), .STEPS(1), .REM_W(REM_W)) u_sq1 (
      .radicand(1'b0), .rem_in(rem[3+k]), .root_in(root[3+k]),
      .rem_out(rem[4+k]), .root_out(root[4+k]));
  end

  logic [REM_W-1:0] rem_final;
  assign rem_final = rem[13];   // final remainder, not needed for a truncated root

  always_comb begin
    if (a.exp == '0) y = FP_ZERO;
    else             y = '{sign: a.sign, exp: e_res, frac: root[13][22:0]};
  end

  logic unused;
  assign unused = ^{rem_final, root[13][23], e_inc[0], e_res_c};
endmodule
