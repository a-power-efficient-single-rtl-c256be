// rev_barrel_shifter: (n,k) reversible bidirectional barrel shifter,
// 32 bits by default.
//
// Operations (left, sra, rotate):
//   0 0 0 logical right shift      1 0 0 logical left shift
//   0 1 0 arithmetic right shift   1 1 0 arithmetic left shift
//   0 x 1 right rotation           1 x 1 left rotation
// Left operations reuse the right shifter by reversing the bit order before
// and after it:
//   Stage I   N/2 Fredkin gates controlled by `left` swap bit j with bit
//             N-1-j (data reversal).
//   Stage II  the universal right shifter (logical / arithmetic / rotate).
//             Sign fill is used only for right shifts.
//   Stage III one Fredkin gate that, for an arithmetic left shift
//             (left = 1, sra = 1), replaces bit 0 of the reversed result by
//             the input sign bit d[N-1], so the sign is kept.
//   Stage IV  N/2 Fredkin gates controlled by `left` reverse the data back.
// An arithmetic left shift therefore returns {d[N-1], (d << s)[N-2:0]}.
// Using `sra` also as the arithmetic-left control (described elsewhere as a separate `sla` control) is
// this design's reading of the operation table. Purely combinational.
module rev_barrel_shifter #(
  parameter int unsigned N = 32,
  parameter int unsigned K = $clog2(N)
) (
  input  logic [N-1:0] i,
  input  logic [K-1:0] s,
  input  logic         left,
  input  logic         sra,
  input  logic         rotate,
  output logic [N-1:0] o
);
  // Fan-out copies of the controls and of the sign bit (Feynman gates).
  logic left_c, left_c2, sign_c, sign_c2;
  rev_feynman u_fg_left (.a(left), .b(1'b0), .p(left_c), .q(left_c2));
  rev_feynman u_fg_sign (.a(i[N-1]), .b(1'b0), .p(sign_c), .q(sign_c2));

  logic sla;
  assign sla = left_c & sra & ~rotate;

  // Stage I: data reversal Fredkin gates (DRFG-I)
  logic [N-1:0] rev_in;
  for (genvar j = 0; j < N / 2; j++) begin : g_drfg1
    logic g;
    rev_fredkin u_fr (.a(left_c), .b(i[N-1-j]), .c(i[j]),
                      .p(g), .q(rev_in[N-1-j]), .r(rev_in[j]));
    logic unused;
    assign unused = g;
  end

  // Stage II: universal right shifter
  logic [N-1:0] rsh;
  rev_right_shifter #(.N(N), .K(K)) u_rlrs (
    .d(rev_in), .s(s), .arith(sra & ~left_c), .rotate(rotate), .q(rsh));

  // Stage III: sign restore for arithmetic left shift
  logic [N-1:0] st3;
  logic         g3p, g3r;
  rev_fredkin u_fr_sla (.a(sla), .b(rsh[0]), .c(sign_c),
                        .p(g3p), .q(st3[0]), .r(g3r));
  assign st3[N-1:1] = rsh[N-1:1];

  // Stage IV: data reversal Fredkin gates (DRFG-II)
  for (genvar j = 0; j < N / 2; j++) begin : g_drfg2
    logic g;
    rev_fredkin u_fr (.a(left_c2), .b(st3[N-1-j]), .c(st3[j]),
                      .p(g), .q(o[N-1-j]), .r(o[j]));
    logic unused;
    assign unused = g;
  end

  logic unused;
  assign unused = sign_c2 ^ g3p ^ g3r;
endmodule
