// tb_fp_mul: floating point multiplier against an exact double-precision
// product truncated to single precision. Includes the waveform operands
// 203.0 * 27.5, both normalisation cases, zero, underflow and overflow.
module tb_fp_mul;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_shift = 0, n_noshift = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, p;
  fp_mul dut (.a(a), .b(b), .p(p));

  task automatic chk(input logic [31:0] x, input logic [31:0] y, input logic [31:0] e);
    a = x; b = y; #1;
    checks++;
    if (p !== e) begin
      failures++;
      $display("FAIL %h * %h got=%h exp=%h", x, y, p, e);
    end
  endtask

  initial begin
    chk(32'h434b0000, 32'h41dc0000, 32'h45ae7400);  // 203 * 27.5 = 5582.5
    chk(32'h3fc00000, 32'h3fc00000, 32'h40100000);  // 1.5 * 1.5 = 2.25 (shift)
    chk(32'hc0000000, 32'h40400000, 32'hc0c00000);  // -2 * 3 = -6
    chk(32'h00000000, 32'h40400000, 32'h00000000);  // zero
    chk(32'h7f000000, 32'h7f000000, 32'h7f800000);  // overflow -> inf
    chk(32'h00800000, 32'h00800000, 32'h00000000);  // underflow -> 0
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] x, y;
      x = rand_fp(64, 190); y = rand_fp(64, 190);
      if ((48'({1'b1, x[22:0]}) * 48'({1'b1, y[22:0]})) >> 47 != 0) n_shift++; else n_noshift++;
      chk(x, y, ref_mul(x, y));
    end
    checks++;
    if (n_shift == 0 || n_noshift == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
