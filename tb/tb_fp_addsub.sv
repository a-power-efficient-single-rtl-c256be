// tb_fp_addsub: floating point adder/subtractor against an exact
// double-precision sum truncated to single precision (exponent differences
// up to 28), plus directed cases: equal magnitudes cancelling, a tiny
// operand far below the other, swap, carry-out normalisation, zero operands.
module tb_fp_addsub;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, y;
  logic        sub;
  fp_addsub dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic chk(input logic [31:0] x, input logic [31:0] z, input logic s,
                     input logic [31:0] e);
    a = x; b = z; sub = s; #1;
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL %h %s %h got=%h exp=%h", x, s ? "-" : "+", z, y, e);
    end
  endtask

  initial begin
    chk(32'h434b0000, 32'h42c80000, 1'b0, 32'h43978000);  // 203 + 100 = 303
    chk(32'h434b0000, 32'h42c80000, 1'b1, 32'h42ce0000);  // 203 - 100 = 103
    chk(32'h42c80000, 32'h434b0000, 1'b1, 32'hc2ce0000);  // 100 - 203 = -103
    chk(32'h3f800000, 32'h3f800000, 1'b1, 32'h00000000);  // 1 - 1 = 0
    chk(32'h3f800000, 32'h2b800000, 1'b1, 32'h3f7fffff);  // 1 - 2^-40 (truncated)
    chk(32'h3f800000, 32'h2b800000, 1'b0, 32'h3f800000);  // 1 + 2^-40
    chk(32'h3f800000, 32'h21800000, 1'b1, 32'h3f7fffff);  // 1 - 2^-60 (all shifted out)
    chk(32'hc0400000, 32'h1f800000, 1'b0, 32'hc03fffff);  // -3 + 2^-64
    chk(32'h3fffffff, 32'h3fffffff, 1'b0, 32'h407fffff);  // carry out
    chk(32'h00000000, 32'h40400000, 1'b1, 32'hc0400000);  // 0 - 3
    chk(32'h40400000, 32'h00000000, 1'b0, 32'h40400000);  // 3 + 0
    chk(32'h7f7fffff, 32'h7f7fffff, 1'b0, 32'h7f800000);  // overflow
    for (int n = 0; n < 6000; n++) begin
      logic [31:0] x, z;
      logic        s;
      x = rand_fp(100, 160);
      z = x;
      z[31]    = 1'($urandom);
      z[30:23] = 8'(int'(x[30:23]) + int'($urandom % 57) - 28);
      if (n % 4 == 0) z[22:0] = x[22:0] ^ 23'($urandom % 16);   // near cancellation
      s = 1'($urandom);
      if (n % 2 == 0) chk(x, z, s, ref_add(x, {z[31] ^ s, z[30:0]}));
      else            chk(z, x, s, ref_add(z, {x[31] ^ s, x[30:0]}));
    end
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
