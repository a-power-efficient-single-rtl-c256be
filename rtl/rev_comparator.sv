// rev_comparator: W-bit unsigned magnitude comparator (8 bits for the
// exponents and 24 bits for the mantissas of the floating point adder).
// Scans from the MSB: the first differing bit decides gt or lt; eq when no
// bit differs. Exactly one output is 1. Combinational.
module rev_comparator #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         gt,
  output logic         lt,
  output logic         eq
);
  always_comb begin
    gt = 1'b0;
    lt = 1'b0;
    for (int j = W - 1; j >= 0; j--) begin
      if (!gt && !lt) begin
        gt = a[j] & ~b[j];
        lt = ~a[j] & b[j];
      end
    end
    eq = ~(gt | lt);
  end
endmodule
