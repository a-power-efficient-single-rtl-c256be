// fir_single_mac: FIR filter of TAPS taps (32 by default) that reuses one
// floating point MAC unit, one tap per clock cycle (time slot).
//
//   y(n) = sum_{k=0}^{TAPS-1} h(k) * x(n-k)
//
// The tap index s (the multiplexer select lines) is an input: the caller
// steps it 0, 1, ..., TAPS-1 once per clock while r2 = 1, and presents the new
// sample x(n) during slot s = 0. Two TAPS:1 multiplexers pick the operands of
// the MAC (Fredkin-gate trees, rev_mux): coefficient h[s], and the sample
// x(n-s). Sample x(n) comes
// straight from the x input in slot 0 and is then pushed into a register
// delay line (hist[0] = x(n), hist[k] = x(n-k) for the rest of that sample
// period). Slot 0 also restarts the MAC sum (start), so no clear cycle is
// lost; the MAC accumulator register is both the accumulator and, through the
// delay line, the filter's delay element.
//
// Output: at the clock edge that ends slot 0 of the next sample period the
// completed sum of the previous period is copied to y and y_valid pulses for
// one cycle. One output per TAPS cycles; y(n) appears TAPS + 1 cycles after
// x(n) was presented. r1 clears the accumulator, the delay line and y.
// The sample delay line, the output register and y_valid are this design's
// own way of completing the filter around the MAC; the single MAC with the
// coefficient multiplexer follows the filter's block diagram.
module fir_single_mac
  import fp_pkg::*;
#(
  parameter int unsigned TAPS = 32,
  parameter int unsigned SW   = $clog2(TAPS)
) (
  input  logic          clk,
  input  logic          r1,          // synchronous reset
  input  logic          r2,          // enable
  input  fp32_t         x,           // new sample, read in slot 0
  input  fp32_t         h [TAPS],    // coefficients h(0) .. h(TAPS-1)
  input  logic [SW-1:0] s,           // time slot / tap select
  output fp32_t         y,
  output logic          y_valid
);
  fp32_t hist [TAPS];
  fp32_t coef, samp, mac_out;
  logic  slot0, primed;

  assign slot0 = (s == '0);

  // TAPS:1 reversible multiplexers: coefficient h(s) and sample x(n-s)
  logic [31:0] h_words [TAPS];
  logic [31:0] s_words [TAPS];
  logic [31:0] coef_w, samp_w;
  for (genvar k = 0; k < TAPS; k++) begin : g_mux_in
    assign h_words[k] = h[k];
    if (k == 0) begin : g_new
      assign s_words[k] = x;
    end else begin : g_old
      assign s_words[k] = hist[k];
    end
  end
  rev_mux #(.N(TAPS), .W(32)) u_coef_mux (.d(h_words), .sel(s), .q(coef_w));
  rev_mux #(.N(TAPS), .W(32)) u_samp_mux (.d(s_words), .sel(s), .q(samp_w));
  assign coef = coef_w;
  assign samp = samp_w;

  fp_mac u_mac (.clk(clk), .r1(r1), .r2(r2), .start(slot0),
                .a(samp), .b(coef), .out(mac_out));

  always_ff @(posedge clk) begin
    if (r1) begin
      for (int k = 0; k < TAPS; k++) hist[k] <= FP_ZERO;
      y       <= FP_ZERO;
      y_valid <= 1'b0;
      primed  <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (r2 && slot0) begin
        hist[0] <= x;
        for (int k = 1; k < TAPS; k++) hist[k] <= hist[k-1];
        if (primed) begin
          y       <= mac_out;
          y_valid <= 1'b1;
        end
        primed <= 1'b1;
      end
    end
  end
endmodule
