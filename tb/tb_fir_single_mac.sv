// tb_fir_single_mac: 32-tap single-MAC FIR filter at its default size.
// Streams random samples through it, stepping the tap select 0..31 once per
// clock, and compares each output with a reference FIR sum accumulated in
// the same tap order with the reference multiply and add. Checks the rate
// (one output every 32 cycles) and the latency (32 + 1 cycles from the slot
// in which x(n) was presented to y_valid).
module tb_fir_single_mac;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  localparam int TAPS = 32;
  localparam int NSAMP = 40;
  int checks = 0, failures = 0, outputs = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        r1, r2;
  fp32_t       x, y;
  fp32_t       h [TAPS];
  logic [4:0]  s;
  logic        y_valid;

  fir_single_mac #(.TAPS(TAPS)) dut (.clk(clk), .r1(r1), .r2(r2), .x(x), .h(h), .s(s),
                                     .y(y), .y_valid(y_valid));

  logic [31:0] xs [NSAMP];
  logic [31:0] expy [NSAMP];
  int          t_in [NSAMP];
  int          cyc = 0, last_valid = -1;
  always @(posedge clk) cyc++;

  initial begin
    for (int k = 0; k < TAPS; k++) h[k] = rand_fp(122, 128);
    for (int n = 0; n < NSAMP; n++) begin
      logic [31:0] acc;
      xs[n] = rand_fp(122, 130);
      acc = 0;
      for (int k = 0; k < TAPS; k++)
        acc = ref_add(acc, ref_mul((n - k >= 0) ? xs[n - k] : 32'h0, h[k]));
      expy[n] = acc;
    end
    r1 = 1; r2 = 0; s = 0; x = 0;
    @(posedge clk); #1;
    r1 = 0; r2 = 1;
    for (int n = 0; n < NSAMP + 1; n++) begin
      for (int k = 0; k < TAPS; k++) begin
        s = 5'(k);
        x = (n < NSAMP) ? xs[n] : 32'h0;
        if (k == 0 && n < NSAMP) t_in[n] = cyc;
        @(posedge clk); #1;
      end
    end
    checks++;
    if (outputs != NSAMP) begin failures++; $display("FAIL %0d outputs", outputs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #2;
    if (y_valid) begin
      checks += 3;
      if (y !== expy[outputs]) begin
        failures++; $display("FAIL y(%0d)=%h exp=%h", outputs, y, expy[outputs]);
      end
      if (cyc - t_in[outputs] != TAPS + 1) begin
        failures++; $display("FAIL latency %0d", cyc - t_in[outputs]);
      end
      if (last_valid >= 0 && cyc - last_valid != TAPS) begin
        failures++; $display("FAIL rate %0d", cyc - last_valid);
      end
      last_valid = cyc;
      outputs++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
