// rev_feynman: 2x2 reversible Feynman (controlled-NOT) gate.
//   p = a, q = a ^ b
// With b tied to 0 it makes a copy of a, which is how reversible circuits fan
// a signal out. Purely combinational. Gate definition as used in the design's
// RCSM cell and shifters.
module rev_feynman (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
