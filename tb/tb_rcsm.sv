// tb_rcsm: exhaustive check of the controlled-subtract-multiplex cell:
// d = u ? (a - b - c) mod 2 : a, bout = borrow of a - b - c.
module tb_rcsm;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic a, b, c, u, d, bout;
  rcsm dut (.a(a), .b(b), .c(c), .u(u), .d(d), .bout(bout));

  initial begin
    for (int v = 0; v < 16; v++) begin
      int diff;
      {a, b, c, u} = 4'(v);
      #1;
      diff = int'(a) - int'(b) - int'(c);
      checks += 2;
      if (bout !== (diff < 0)) begin
        failures++; $display("FAIL bout a=%b b=%b c=%b", a, b, c);
      end
      if (d !== (u ? logic'(diff & 1) : a)) begin
        failures++; $display("FAIL d a=%b b=%b c=%b u=%b d=%b", a, b, c, u, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
