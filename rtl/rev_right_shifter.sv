// rev_right_shifter: (n,k) reversible universal right shifter.
//
// Shifts the N-bit input right by the K-bit amount `s`. With rotate = 1 the
// bits that leave at the bottom re-enter at the top (right rotation); else,
// with arith = 1 the vacated top bits are filled with the sign bit d[N-1]
// (arithmetic right shift); otherwise they are filled with zeros (logical).
// It is a logarithmic barrel: stage b shifts by 2^b when s[b] is set, each
// output bit being a Fredkin gate used as a 2:1 multiplexer. A Feynman gate
// copies the sign bit for the fill, as reversible logic has no fan-out.
// The stage order and the priority of rotate over arith are this design's
// choice. Purely combinational.
module rev_right_shifter #(
  parameter int unsigned N = 32,
  parameter int unsigned K = $clog2(N)
) (
  input  logic [N-1:0] d,
  input  logic [K-1:0] s,
  input  logic         arith,
  input  logic         rotate,
  output logic [N-1:0] q
);
  logic sign_src, sign_copy;
  rev_feynman u_sign_fg (.a(d[N-1]), .b(1'b0), .p(sign_src), .q(sign_copy));

  logic fill_bit;
  assign fill_bit = arith & sign_copy;

  logic [N-1:0] stage [K+1];
  assign stage[0] = d;

  for (genvar b = 0; b < K; b++) begin : g_stage
    localparam int unsigned SH = 1 << b;
    for (genvar j = 0; j < N; j++) begin : g_bit
      logic shifted_in, g_p, g_r;
      if (j + SH < N) begin : g_inside
        assign shifted_in = stage[b][j + SH];
      end else begin : g_edge
        assign shifted_in = rotate ? stage[b][(j + SH) % N] : fill_bit;
      end
      rev_fredkin u_mux (.a(s[b]), .b(stage[b][j]), .c(shifted_in),
                         .p(g_p), .q(stage[b+1][j]), .r(g_r));
      logic unused;
      assign unused = g_p ^ g_r;   // garbage outputs of the reversible gate
    end
  end

  assign q = stage[K];

  logic unused;
  assign unused = sign_src;
endmodule
