// fp_pkg: shared types and constants for the single precision (IEEE-754
// binary32) datapath. A float is split into sign, 8-bit biased exponent and
// 23-bit trailing significand. The design handles normal numbers; an exponent
// field of zero is read as the value zero, and results that leave the normal
// range are flushed to zero (underflow) or saturated to infinity (overflow).
// These range rules are this design's own choice; the arithmetic itself
// follows the algorithms of the respective units.
package fp_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned BIAS   = 127;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  // Arithmetic unit operation select (4:1 output multiplexer).
  typedef enum logic [1:0] {
    OP_ADDSUB = 2'd0,
    OP_MUL    = 2'd1,
    OP_DIV    = 2'd2,
    OP_SHSQ   = 2'd3    // shifter or square root, chosen by the 2:1 multiplexer
  } au_op_e;

  localparam fp32_t FP_ZERO = '{sign: 1'b0, exp: '0, frac: '0};

  function automatic fp32_t fp_inf(input logic s);
    return '{sign: s, exp: '1, frac: '0};
  endfunction

endpackage
