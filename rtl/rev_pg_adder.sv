// rev_pg_adder: propagate/generate (carry look-ahead) adder/subtractor.
//
// Used as the 8-bit exponent adder of the multiplier and as the 24-bit
// mantissa adder/subtractor of the floating point adder. With sub = 1 the
// operand b is inverted (a row of XOR/Feynman gates) and a carry of 1 is fed
// in, giving a - b in two's complement; cout is then 1 when a >= b.
// Per bit p = a ^ b', g = a & b'; the carries are expanded in look-ahead form
// c[j+1] = g[j] | p[j] & c[j], written per bit; a synthesis tool
// flattens the chain into two-level logic per carry. Width is a parameter; the
// look-ahead arrangement within it is this design's own. Combinational.
module rev_pg_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] bx, p, g;
  logic [W:0]   c;

  assign bx = b ^ {W{sub}};
  assign p  = a ^ bx;
  assign g  = a & bx;

  assign c[0] = sub;
  for (genvar j = 0; j < W; j++) begin : g_carry
    assign c[j+1] = g[j] | (p[j] & c[j]);
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];
endmodule
