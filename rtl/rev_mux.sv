// rev_mux: N:1 reversible multiplexer of W-bit words (32:1 by default, as
// used for the coefficients and samples of the single-MAC FIR filter).
//
// A binary tree of Fredkin gates used as 2:1 multiplexers: level l selects
// between pairs of words with select bit sel[l] (level 0 nearest the
// inputs, driven by the select LSB). N must be a power of two. The tree
// arrangement is this design's choice. Combinational.
module rev_mux #(
  parameter int unsigned N  = 32,
  parameter int unsigned W  = 32,
  parameter int unsigned SW = $clog2(N)
) (
  input  logic [W-1:0]  d [N],
  input  logic [SW-1:0] sel,
  output logic [W-1:0]  q
);
  // level l holds N >> l words
  for (genvar l = 0; l <= SW; l++) begin : g_lvl
    logic [W-1:0] w [N >> l];
    if (l == 0) begin : g_in
      for (genvar i = 0; i < N; i++) begin : g_word
        assign w[i] = d[i];
      end
    end else begin : g_tree
      for (genvar i = 0; i < (N >> l); i++) begin : g_word
        for (genvar b = 0; b < W; b++) begin : g_bit
          logic gp, gr;
          rev_fredkin u_fr (.a(sel[l-1]), .b(g_lvl[l-1].w[2*i][b]),
                            .c(g_lvl[l-1].w[2*i+1][b]),
                            .p(gp), .q(w[i][b]), .r(gr));
          logic unused;
          assign unused = gp ^ gr;
        end
      end
    end
  end

  assign q = g_lvl[SW].w[0];
endmodule
