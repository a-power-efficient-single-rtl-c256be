// rcsm: Reversible Controlled-Subtract-Multiplex cell, the building block of
// the unsigned square-root array.
//
// It computes the one-bit difference d1 = a - b - c with borrow out bout, and
// then selects d = u ? d1 : a. In a square-root row u is the root bit of that
// row: when the trial subtraction did not go negative (u = 1) the difference
// is kept, otherwise the previous remainder bit a is passed on (restoring
// step). Structure as in the cell's gate-level description: a Feynman gate
// copies a, two TR gates form the full subtractor (the first gives a^b and
// ~a&b, the second the difference and the borrow), and a Fredkin gate
// controlled by u is the multiplexer. Which Fredkin output carries d is this
// design's choice. Purely combinational.
module rcsm (
  input  logic a,     // minuend bit (remainder bit)
  input  logic b,     // subtrahend bit
  input  logic c,     // borrow in
  input  logic u,     // select: 1 = take difference, 0 = keep a
  output logic d,     // selected output bit
  output logic bout   // borrow out
);
  logic a_copy, a_fg;
  logic g1, axb, anb;
  logic g2, d1;
  logic g3, g4;

  rev_feynman u_fg  (.a(a), .b(1'b0), .p(a_fg), .q(a_copy));
  rev_tr      u_tr1 (.a(b), .b(a_fg), .c(1'b0), .p(g1), .q(axb), .r(anb));
  rev_tr      u_tr2 (.a(c), .b(axb), .c(anb), .p(g2), .q(d1), .r(bout));
  rev_fredkin u_fr  (.a(u), .b(a_copy), .c(d1), .p(g3), .q(d), .r(g4));

  // g1..g4 are garbage outputs of the reversible cell.
  logic unused;
  assign unused = g1 ^ g2 ^ g3 ^ g4;
endmodule
