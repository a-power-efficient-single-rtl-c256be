// tb_fp_div: Goldschmidt divider. The exact quotient is formed in double
// precision and truncated to single precision; the divider must return
// that value or the one a unit in the last place below it (the iteration
// approaches the quotient from below, so even an exactly representable
// quotient may come out one unit low). Zero operands are checked exactly.
module tb_fp_div;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0, n_exact = 0, n_below = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, q;
  fp_div dut (.a(a), .b(b), .q(q));

  task automatic chk(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] e;
    a = x; b = y; #1;
    e = ref_div(x, y);
    checks++;
    if (q === e) n_exact++;
    else if (e[30:0] != 0 && q === e - 32'd1 && e[30:23] != 8'hff) n_below++;
    else begin
      failures++;
      $display("FAIL %h / %h got=%h exp=%h", x, y, q, e);
    end
  endtask

  task automatic chk_exact(input logic [31:0] x, input logic [31:0] y, input logic [31:0] e);
    a = x; b = y; #1;
    checks++;
    if (q !== e) begin failures++; $display("FAIL %h / %h got=%h exp=%h", x, y, q, e); end
  endtask

  initial begin
    chk(32'h434b0000, 32'h42c80000);                     // 203 / 100
    chk(32'h40c00000, 32'h40400000); // 6 / 3 = 2
    chk(32'h3f800000, 32'h40000000); // 1 / 2
    chk(32'hc1200000, 32'h40a00000); // -10 / 5
    chk_exact(32'h00000000, 32'h40a00000, 32'h00000000); // 0 / 5
    chk_exact(32'h40a00000, 32'h00000000, 32'h7f800000); // 5 / 0 -> inf
    for (int n = 0; n < 5000; n++) chk(rand_fp(64, 190), rand_fp(64, 190));
    $display("exact=%0d one-below=%0d", n_exact, n_below);
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
