// rev_lzd: leading zero detector, 32 bits by default.
// count is the number of zero bits above the most significant 1 of d;
// zero = 1 (and count = W) when d is all zeros. Built as a priority scan
// from the LSB upwards so the highest 1 wins. Combinational.
module rev_lzd #(
  parameter int unsigned W  = 32,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  d,
  output logic [CW-1:0] count,
  output logic          zero
);
  always_comb begin
    count = CW'(W);
    for (int j = 0; j < W; j++) begin
      if (d[j]) count = CW'(W - 1 - j);
    end
    zero = (d == '0);
  end
endmodule
