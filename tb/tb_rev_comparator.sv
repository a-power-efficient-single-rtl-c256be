// tb_rev_comparator: 8-bit (exhaustive) and 24-bit (random, with equal and
// near-equal operands) magnitude comparators.
module tb_rev_comparator;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  a8, b8;
  logic [23:0] a24, b24;
  logic gt8, lt8, eq8, gt24, lt24, eq24;
  rev_comparator #(.W(8))  u8  (.a(a8), .b(b8), .gt(gt8), .lt(lt8), .eq(eq8));
  rev_comparator #(.W(24)) u24 (.a(a24), .b(b24), .gt(gt24), .lt(lt24), .eq(eq24));

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y += 3) begin
        a8 = 8'(x); b8 = 8'(y); #1;
        checks++;
        if ({gt8, lt8, eq8} !== {x > y, x < y, x == y}) begin
          failures++; $display("FAIL 8: %0d %0d", x, y);
        end
      end
    end
    for (int n = 0; n < 2000; n++) begin
      a24 = 24'($urandom);
      b24 = (n % 3 == 0) ? a24 : (n % 3 == 1) ? a24 ^ (24'd1 << (n % 24)) : 24'($urandom);
      #1;
      checks++;
      if ({gt24, lt24, eq24} !== {a24 > b24, a24 < b24, a24 == b24}) begin
        failures++; $display("FAIL 24: %h %h", a24, b24);
      end
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
