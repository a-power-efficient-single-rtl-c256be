// tb_rev_mult_24x24: operand-decomposition multiplier against the *
// operator on random and corner operands.
module tb_rev_mult_24x24;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [23:0] a, b;
  logic [47:0] p;
  rev_mult_24x24 #(.W(24)) dut (.a(a), .b(b), .p(p));

  initial begin
    for (int n = 0; n < 3000; n++) begin
      a = 24'($urandom); b = 24'($urandom);
      if (n == 0) begin a = '1; b = '1; end
      if (n == 1) begin a = 0;  b = '1; end
      #1;
      checks++;
      if (p !== 48'(a) * 48'(b)) begin failures++; $display("FAIL %h * %h = %h", a, b, p); end
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
