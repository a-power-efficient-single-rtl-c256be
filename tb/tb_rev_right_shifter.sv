// tb_rev_right_shifter: universal right shifter (logical, arithmetic,
// rotate) against shift operators, every amount, random data.
module tb_rev_right_shifter;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] d, q, exp;
  logic [4:0]  s;
  logic        arith, rotate;
  rev_right_shifter #(.N(32)) dut (.d(d), .s(s), .arith(arith), .rotate(rotate), .q(q));

  initial begin
    for (int i = 0; i < 600; i++) begin
      d = $urandom; s = 5'(i % 32); arith = 1'((i / 32) % 2); rotate = 1'((i / 64) % 2);
      if (i % 3 == 0) d[31] = 1'b1;
      #1;
      if (rotate)     exp = (d >> s) | (d << (6'd32 - 6'(s)));
      else if (arith) exp = 32'($signed(d) >>> s);
      else            exp = d >> s;
      checks++;
      if (q !== exp) begin
        failures++;
        $display("FAIL d=%h s=%0d ar=%b rot=%b q=%h exp=%h", d, s, arith, rotate, q, exp);
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
