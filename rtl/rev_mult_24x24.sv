// rev_mult_24x24: unsigned W x W multiplier (24 x 24 by default) built by
// operand decomposition: both operands are cut into W/2 two-bit digits, every
// digit pair is multiplied by a 2x2 multiplier, and the (W/2)^2 four-bit
// partial products, each weighted by 4^(i+j), are summed. The sum is written
// as an adder tree over the partial products; the exact compressor
// arrangement of the tree is left to synthesis. W must be even.
// Combinational, full 2W-bit product.
module rev_mult_24x24 #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int unsigned D = W / 2;

  logic [3:0] pp [D][D];

  for (genvar i = 0; i < D; i++) begin : g_row
    for (genvar j = 0; j < D; j++) begin : g_col
      rev_mult_2x2 u_m (.a(a[2*i +: 2]), .b(b[2*j +: 2]), .p(pp[i][j]));
    end
  end

  // Sum the partial products row by row: each row is a digit of a times b.
  logic [2*W-1:0] row_sum [D];
  always_comb begin
    for (int i = 0; i < D; i++) begin
      row_sum[i] = '0;
      for (int j = 0; j < D; j++) begin
        row_sum[i] = row_sum[i] + ((2*W)'(pp[i][j]) << (2 * (i + j)));
      end
    end
    p = '0;
    for (int i = 0; i < D; i++) begin
      p = p + row_sum[i];
    end
  end
endmodule
