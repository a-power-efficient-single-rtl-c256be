// rev_mult_2x2: 2x2-bit multiplier, the leaf of the operand-decomposition
// multiplier. p = a * b (4 bits): four partial-product ANDs (Peres/Toffoli
// gates in a reversible realisation) reduced Wallace-style with two half
// adders. Combinational.
module rev_mult_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic pp00, pp01, pp10, pp11, c1;
  assign pp00 = a[0] & b[0];
  assign pp01 = a[0] & b[1];
  assign pp10 = a[1] & b[0];
  assign pp11 = a[1] & b[1];

  assign p[0] = pp00;
  assign p[1] = pp01 ^ pp10;            // half adder, column 1
  assign c1   = pp01 & pp10;
  assign p[2] = pp11 ^ c1;              // half adder, column 2
  assign p[3] = pp11 & c1;
endmodule
