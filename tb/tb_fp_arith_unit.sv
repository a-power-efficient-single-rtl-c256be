// tb_fp_arith_unit: the arithmetic unit's output multiplexers. For random
// operands every select value (add, subtract, multiply, divide, shifter,
// square root) must return the matching reference result.
module tb_fp_arith_unit;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] in1, in2, in3, in4, out;
  au_op_e      sel;
  logic        h1, sub, lef, sra, rot;
  logic [4:0]  select;

  fp_arith_unit dut (.in1(in1), .in2(in2), .in3(in3), .in4(in4), .sel(sel), .h1(h1),
                     .sub(sub), .lef(lef), .sra(sra), .rot(rot), .select(select), .out(out));

  task automatic chk(input string what, input logic [31:0] e, input logic allow_below);
    #1;
    checks++;
    if (out !== e && !(allow_below && out === e - 32'd1)) begin
      failures++;
      $display("FAIL %s in1=%h in2=%h in3=%h in4=%h out=%h exp=%h", what, in1, in2, in3, in4, out, e);
    end
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      in1 = rand_fp(100, 150); in2 = rand_fp(100, 150); in3 = $urandom;
      in4 = rand_fp(1, 254); in4[31] = 1'b0;
      select = 5'($urandom); lef = 1'($urandom); sra = 1'b0; rot = 1'b0;
      sel = OP_ADDSUB; sub = 1'b0; h1 = 1'b0; chk("add", ref_add(in1, in2), 1'b0);
      sub = 1'b1;                              chk("sub", ref_add(in1, {~in2[31], in2[30:0]}), 1'b0);
      sel = OP_MUL;                            chk("mul", ref_mul(in1, in2), 1'b0);
      sel = OP_DIV;                            chk("div", ref_div(in1, in2), 1'b1);
      sel = OP_SHSQ; h1 = 1'b0;                chk("shift", lef ? in3 << select : in3 >> select, 1'b0);
      h1 = 1'b1;                               chk("sqrt", ref_sqrt(in4), 1'b0);
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
