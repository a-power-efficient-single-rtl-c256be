// rev_fredkin: 3x3 reversible Fredkin (controlled-swap) gate.
//   p = a, q = a ? c : b, r = a ? b : c
// When the control a is 1 the two data lines are swapped. Used as a 2:1
// multiplexer (q output) and as the data-reversal element of the barrel
// shifter. Purely combinational.
module rev_fredkin (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) | (a & c);
  assign r = (~a & c) | (a & b);
endmodule
