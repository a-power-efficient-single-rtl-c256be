// tb_rev_pg_adder: 8-bit and 24-bit propagate/generate adder/subtractor
// against the + and - operators (sum and carry/no-borrow out).
module tb_rev_pg_adder;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  a8, b8, s8;
  logic [23:0] a24, b24, s24;
  logic        sub, c8, c24;
  rev_pg_adder #(.W(8))  u8  (.a(a8), .b(b8), .sub(sub), .sum(s8), .cout(c8));
  rev_pg_adder #(.W(24)) u24 (.a(a24), .b(b24), .sub(sub), .sum(s24), .cout(c24));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [8:0]  e8;
      logic [24:0] e24;
      a8 = 8'($urandom); b8 = 8'($urandom); a24 = 24'($urandom); b24 = 24'($urandom);
      sub = 1'(n % 2);
      if (n % 50 == 0) begin b8 = a8; b24 = a24; end
      #1;
      e8  = sub ? {1'b0, a8} + {1'b0, ~b8} + 9'd1 : {1'b0, a8} + {1'b0, b8};
      e24 = sub ? {1'b0, a24} + {1'b0, ~b24} + 25'd1 : {1'b0, a24} + {1'b0, b24};
      checks += 2;
      if ({c8, s8} !== e8)    begin failures++; $display("FAIL 8: %h %h sub=%b", a8, b8, sub); end
      if ({c24, s24} !== e24) begin failures++; $display("FAIL 24: %h %h sub=%b", a24, b24, sub); end
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
