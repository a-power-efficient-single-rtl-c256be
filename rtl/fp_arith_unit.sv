// fp_arith_unit: the single precision floating point arithmetic unit.
//
// Five operators work in parallel on their inputs and a multiplexer tree
// picks one result:
//   in1, in2 -> adder/subtractor (sub chooses in1 - in2), multiplier, divider
//   in3      -> 32-bit bidirectional barrel shifter (lef, sra, rot, select)
//   in4      -> square root
// A 2:1 multiplexer (h1: 0 = shifter, 1 = square root) feeds input 3 of the
// 4:1 output multiplexer; sel: 0 = add/sub, 1 = multiply, 2 = divide,
// 3 = shifter / square root. The operator-to-multiplexer-input mapping
// follows the unit's block diagram; the single select line h1 of the 2:1
// multiplexer, the `sub` control and the name `sra` for the arithmetic-shift
// control are this design's choices. Fully combinational: `out` settles in
// the same cycle the inputs change.
module fp_arith_unit
  import fp_pkg::*;
(
  input  fp32_t       in1,
  input  fp32_t       in2,
  input  logic [31:0] in3,
  input  fp32_t       in4,
  input  au_op_e      sel,
  input  logic        h1,
  input  logic        sub,
  input  logic        lef,
  input  logic        sra,
  input  logic        rot,
  input  logic [4:0]  select,
  output logic [31:0] out
);
  fp32_t       y_add, y_mul, y_div, y_sqrt;
  logic [31:0] y_sh, y_shsq;

  fp_addsub          u_addsub (.a(in1), .b(in2), .sub(sub), .y(y_add));
  fp_mul             u_mul    (.a(in1), .b(in2), .p(y_mul));
  fp_div             u_div    (.a(in1), .b(in2), .q(y_div));
  rev_barrel_shifter u_shift  (.i(in3), .s(select), .left(lef), .sra(sra),
                               .rotate(rot), .o(y_sh));
  fp_sqrt            u_sqrt   (.a(in4), .y(y_sqrt));

  // 2:1 and 4:1 output multiplexers (Fredkin-gate trees)
  logic [31:0] shsq_in [2];
  logic [31:0] out_in  [4];
  assign shsq_in[0] = y_sh;
  assign shsq_in[1] = y_sqrt;
  rev_mux #(.N(2), .W(32)) u_mux_shsq (.d(shsq_in), .sel(h1), .q(y_shsq));

  assign out_in[OP_ADDSUB] = y_add;
  assign out_in[OP_MUL]    = y_mul;
  assign out_in[OP_DIV]    = y_div;
  assign out_in[OP_SHSQ]   = y_shsq;
  rev_mux #(.N(4), .W(32)) u_mux_out (.d(out_in), .sel(sel), .q(out));
endmodule
