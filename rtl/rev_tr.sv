// rev_tr: 3x3 reversible TR gate.
//   p = a, q = a ^ b, r = (a & ~b) ^ c
// Two TR gates in series form a reversible full subtractor (see rcsm).
// Purely combinational.
module rev_tr (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & ~b) ^ c;
endmodule
