// rev_usqrt_unit: reversible unsigned square-root unit built from RCSM rows.
//
// The unit takes IN_BITS radicand bits (MSB first), pads them on the right
// with zeros to 2*STEPS bits, and runs STEPS restoring square-root steps on
// them. Each step brings down the next two radicand bits, T = 4*rem + pair,
// and subtracts S = 4*root + 1 with a row of RCSM cells. The borrow out of
// the row's top cell decides the new root bit (no borrow -> 1) and drives the
// multiplex input u of every cell of the row, so the row outputs either the
// difference or T unchanged as the next remainder. A 2n-bit radicand thus
// gives an n-bit root (the 6-bit unit gives 3 root bits, as in the design's
// 6-bit example); the 3-bit unit of the floating point square root uses
// STEPS = 3, i.e. two appended zero bits, and the 1-bit units append one.
//
// Units chain: rem_in/root_in carry the partial remainder and root of the
// units before (tie to 0 for the first unit), so the 12-, 6-, 4-, 3- and
// ten 1-bit units of the floating point square root form one long restoring
// square root. The remainder/root bus widths (REM_W, ROOT_W) are this
// design's choice and sized for a 24-bit root. Purely combinational.
module rev_usqrt_unit #(
  parameter int unsigned IN_BITS = 6,
  parameter int unsigned STEPS   = (IN_BITS + 1) / 2,
  parameter int unsigned REM_W   = 28,
  parameter int unsigned ROOT_W  = 24
) (
  input  logic [IN_BITS-1:0] radicand,   // next radicand bits, MSB first
  input  logic [REM_W-1:0]   rem_in,     // partial remainder so far
  input  logic [ROOT_W-1:0]  root_in,    // root bits so far (right aligned)
  output logic [REM_W-1:0]   rem_out,
  output logic [ROOT_W-1:0]  root_out
);
  localparam int unsigned PAD_W = 2 * STEPS;

  logic [PAD_W-1:0] padded;
  assign padded = PAD_W'(radicand) << (PAD_W - IN_BITS);

  logic [REM_W-1:0]  rem   [STEPS+1];
  logic [ROOT_W-1:0] root  [STEPS+1];

  assign rem[0]  = rem_in;
  assign root[0] = root_in;

  for (genvar s = 0; s < STEPS; s++) begin : g_step
    logic [REM_W-1:0] t_val, s_val, d_val;
    logic [REM_W:0]   borrow;
    logic             u;

    assign t_val     = {rem[s][REM_W-3:0], padded[PAD_W-1-2*s -: 2]};
    assign s_val     = (REM_W'(root[s]) << 2) | REM_W'(1);
    assign borrow[0] = 1'b0;
    assign u         = ~borrow[REM_W];

    for (genvar j = 0; j < REM_W; j++) begin : g_cell
      rcsm u_cell (
        .a   (t_val[j]),
        .b   (s_val[j]),
        .c   (borrow[j]),
        .u   (u),
        .d   (d_val[j]),
        .bout(borrow[j+1])
      );
    end

    assign rem[s+1]  = d_val;
    assign root[s+1] = {root[s][ROOT_W-2:0], u};
  end

  assign rem_out  = rem[STEPS];
  assign root_out = root[STEPS];
endmodule
