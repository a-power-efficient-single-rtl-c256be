// fp_dsp_top: top level of the single precision floating point DSP datapath.
//
// Two parts stand side by side, each with its own ports:
//   * the arithmetic unit (fp_arith_unit): adder/subtractor, multiplier and
//     divider on in1/in2, bidirectional barrel shifter on in3, square root on
//     in4, one result selected by sel and h1. Combinational.
//   * the FIR filter (fir_single_mac): one floating point MAC (multiplier,
//     adder, PIPO accumulator) reused for all TAPS taps, one tap per clock,
//     tap select s driven from outside.
// The MAC inside the filter has its own multiplier and adder instances, so
// both parts can work in the same cycle. TAPS defaults to 32.
module fp_dsp_top
  import fp_pkg::*;
#(
  parameter int unsigned TAPS = 32
) (
  // arithmetic unit
  input  fp32_t        in1,
  input  fp32_t        in2,
  input  logic [31:0]  in3,
  input  fp32_t        in4,
  input  au_op_e       sel,
  input  logic         h1,
  input  logic         sub,
  input  logic         lef,
  input  logic         sra,
  input  logic         rot,
  input  logic [4:0]   select,
  output logic [31:0]  out,
  // FIR filter
  input  logic                    clk,
  input  logic                    r1,
  input  logic                    r2,
  input  fp32_t                   x,
  input  fp32_t                   h [TAPS],
  input  logic [$clog2(TAPS)-1:0] s,
  output fp32_t                   y,
  output logic                    y_valid
);
  fp_arith_unit u_au (
    .in1(in1), .in2(in2), .in3(in3), .in4(in4), .sel(sel), .h1(h1),
    .sub(sub), .lef(lef), .sra(sra), .rot(rot), .select(select), .out(out));

  fir_single_mac #(.TAPS(TAPS)) u_fir (
    .clk(clk), .r1(r1), .r2(r2), .x(x), .h(h), .s(s), .y(y), .y_valid(y_valid));
endmodule
