// tb_fp_sqrt: floating point square root against an integer-bisection
// reference (truncated root), on directed and random operands.
module tb_fp_sqrt;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, y;
  fp_sqrt dut (.a(a), .y(y));

  task automatic chk(input logic [31:0] v, input logic [31:0] exp);
    a = v; #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL sqrt(%h) got=%h exp=%h", v, y, exp);
    end
  endtask

  initial begin
    chk(32'h40800000, 32'h40000000);        // sqrt(4)   = 2
    chk(32'h3f800000, 32'h3f800000);        // sqrt(1)   = 1
    chk(32'h41100000, 32'h40400000);        // sqrt(9)   = 3
    chk(32'h40000000, 32'h3fb504f3);        // sqrt(2)   = 1.4142135 (truncated)
    chk(32'h3e800000, 32'h3f000000);        // sqrt(1/4) = 1/2
    chk(32'h00000000, 32'h00000000);        // zero
    chk(32'h434b0000, ref_sqrt(32'h434b0000));
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] v;
      v = rand_fp(1, 254);
      v[31] = 1'b0;
      chk(v, ref_sqrt(v));
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
