// fp_div: single precision floating point divider using Goldschmidt's
// algorithm.
//
// The significands N = 1.a_frac and D = 1.b_frac lie in [1, 2). A reciprocal
// ROM indexed by the top ROM_BITS fraction bits of D gives K1 ~ 1/D. Then
//   MULT1 q1 = K1 * N        MULT2 r1 = K1 * D
//   two's complement        K2 = 2 - r1
//   MULT4 q2 = K2 * q1       MULT3 r2 = K2 * r1
// and, for ITER > 1, further rounds K(i+1) = 2 - r(i). r approaches 1 and q
// approaches N / D. With a ROM error e (|e| < 2^-(ROM_BITS+1)) one round
// leaves a relative error e^2, below one unit in the last place for
// ROM_BITS = 12. Since q approaches the quotient from below, the truncated
// result equals the truncated exact quotient or lies one unit in the last
// place below it.
//
// The ROM holds round(2^(F+R+1) / (2^(R+1) + 2*idx + 1)), the reciprocal of
// the midpoint of each D interval, computed at elaboration (no data file).
// Internal values are fixed point with F = 30 fraction bits, truncated
// after every multiplication.
//
// Exponent a.exp - b.exp + 127, minus 1 when q < 1 (then q is shifted left
// one bit). Normal numbers only: a zero dividend gives zero, a zero divisor
// gives infinity; underflow flushes to zero, overflow saturates to infinity.
// ROM size, iteration count default, internal precision and these range rules
// are this design's choices. Combinational.
module fp_div
  import fp_pkg::*;
#(
  parameter int unsigned ROM_BITS = 12,
  parameter int unsigned ITER     = 1
) (
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t q
);
  localparam int unsigned F = 30;
  localparam int unsigned R = ROM_BITS;

  function automatic logic [F:0] k1_value(input int unsigned idx);
    logic [63:0] num, den;
    num = 64'd1 << (F + R + 2);               // two times the value, to round
    den = (64'd1 << (R + 1)) + 64'(2 * idx + 1);
    return (F+1)'(((num / den) + 64'd1) >> 1);
  endfunction

  // Reciprocal ROM
  logic [F:0] rom [2**R];
  for (genvar i = 0; i < 2**R; i++) begin : g_rom
    localparam logic [F:0] KV = k1_value(i);
    assign rom[i] = KV;
  end

  logic [R-1:0] idx;
  logic [F:0]   k1;
  assign idx = b.frac[22 -: R];
  assign k1  = rom[idx];

  logic [63:0] n_f, d_f;
  assign n_f = 64'({1'b1, a.frac}) << (F - 23);
  assign d_f = 64'({1'b1, b.frac}) << (F - 23);

  logic [63:0] qv [ITER+1];
  logic [63:0] rv [ITER+1];
  logic [63:0] mult1, mult2;
  assign mult1  = n_f * 64'(k1);
  assign mult2  = d_f * 64'(k1);
  assign qv[0]  = mult1 >> F;
  assign rv[0]  = mult2 >> F;

  for (genvar it = 0; it < ITER; it++) begin : g_iter
    logic [63:0] k, mq, mr;
    assign k          = (64'd2 << F) - rv[it];  // two's complement of r
    assign mq         = qv[it] * k;
    assign mr         = rv[it] * k;
    assign qv[it+1]   = mq >> F;
    assign rv[it+1]   = mr >> F;
  end

  logic [63:0] qf;
  logic        q_ge1;
  logic [22:0] frac_n;
  logic [9:0]  e_res;
  assign qf     = qv[ITER];
  assign q_ge1  = qf[F];
  assign frac_n = q_ge1 ? qf[F-1 -: 23] : qf[F-2 -: 23];
  assign e_res  = 10'(a.exp) - 10'(b.exp) + 10'(BIAS) - 10'(!q_ge1);

  logic s_res;
  assign s_res = a.sign ^ b.sign;

  always_comb begin
    if (a.exp == '0)                   q = '{sign: s_res, exp: '0, frac: '0};
    else if (b.exp == '0)              q = fp_inf(s_res);
    else if (e_res[9] || e_res == '0)  q = '{sign: s_res, exp: '0, frac: '0};
    else if (e_res >= 10'd255)         q = fp_inf(s_res);
    else                               q = '{sign: s_res, exp: e_res[7:0], frac: frac_n};
  end

  logic unused;
  assign unused = ^{qf[63:F+1], qf[F-24:0], rv[ITER], b.frac[22-R:0], mult1[F-1:0], mult2[F-1:0]};
endmodule
