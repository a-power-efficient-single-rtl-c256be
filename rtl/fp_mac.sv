// fp_mac: single precision floating point multiply-accumulate unit.
//
// The floating point multiplier forms a * b, the floating point adder adds
// the product to the accumulator, and the accumulator is a parallel-in
// parallel-out (PIPO) register of D flip-flops whose output is fed back to
// the adder and is the unit's output. One product is accumulated per clock.
//
// Controls (names follow the unit's port list; their meaning is this
// design's choice): r1 clears the accumulator synchronously, r2 enables
// accumulation. start makes the adder take 0 instead of the accumulator, so
// a new sum begins with this product (used by the FIR filter to start each
// output sample without losing a cycle). Priority: r1, then r2.
// Timing: out shows the sum including a*b one clock edge after a, b are
// applied with r2 = 1.
module fp_mac
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  r1,      // synchronous clear
  input  logic  r2,      // accumulate enable
  input  logic  start,   // begin a new sum with this product
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t out
);
  fp32_t prod, acc_in, sum, acc_q;

  fp_mul    u_mul (.a(a), .b(b), .p(prod));
  assign acc_in = start ? FP_ZERO : acc_q;
  fp_addsub u_add (.a(acc_in), .b(prod), .sub(1'b0), .y(sum));

  // PIPO accumulator register
  always_ff @(posedge clk) begin
    if (r1)      acc_q <= FP_ZERO;
    else if (r2) acc_q <= sum;
  end

  assign out = acc_q;
endmodule
