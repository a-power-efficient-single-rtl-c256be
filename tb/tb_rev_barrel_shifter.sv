// tb_rev_barrel_shifter: bidirectional barrel shifter. Checks the two
// published waveform cases (0xC0000000 arithmetic right by 1 -> 0xE0000000,
// left rotate by 1 -> 0x80000001) and all six operations on random data
// and every shift amount against shift operators.
module tb_rev_barrel_shifter;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] i_d, o, exp;
  logic [4:0]  s;
  logic        left, sra, rotate;
  rev_barrel_shifter #(.N(32)) dut (.i(i_d), .s(s), .left(left), .sra(sra),
                                    .rotate(rotate), .o(o));

  function automatic logic [31:0] model(input logic [31:0] d, input logic [4:0] sh,
                                        input logic l, input logic ar, input logic rt);
    if (rt && !l)  return (d >> sh) | (d << (6'd32 - 6'(sh)));
    if (rt && l)   return (d << sh) | (d >> (6'd32 - 6'(sh)));
    if (!l && ar)  return 32'($signed(d) >>> sh);
    if (!l)        return d >> sh;
    if (ar)        return {d[31], 31'(d << sh)};
    return d << sh;
  endfunction

  task automatic run(input logic [31:0] d, input logic [4:0] sh, input logic l,
                     input logic ar, input logic rt, input logic [31:0] e);
    i_d = d; s = sh; left = l; sra = ar; rotate = rt; #1;
    checks++;
    if (o !== e) begin
      failures++;
      $display("FAIL i=%h s=%0d left=%b sra=%b rot=%b o=%h exp=%h", d, sh, l, ar, rt, o, e);
    end
  endtask

  initial begin
    run(32'hC0000000, 5'd1, 1'b0, 1'b1, 1'b0, 32'hE0000000);
    run(32'hC0000000, 5'd1, 1'b1, 1'b0, 1'b1, 32'h80000001);
    for (int n = 0; n < 1200; n++) begin
      logic [31:0] d;
      logic [2:0]  op;
      d  = $urandom;
      op = 3'(n % 6);
      exp = 0;
      case (op)
        3'd0: run(d, 5'(n / 6), 1'b0, 1'b0, 1'b0, model(d, 5'(n / 6), 1'b0, 1'b0, 1'b0));
        3'd1: run(d, 5'(n / 6), 1'b0, 1'b1, 1'b0, model(d, 5'(n / 6), 1'b0, 1'b1, 1'b0));
        3'd2: run(d, 5'(n / 6), 1'b0, 1'b0, 1'b1, model(d, 5'(n / 6), 1'b0, 1'b0, 1'b1));
        3'd3: run(d, 5'(n / 6), 1'b1, 1'b0, 1'b0, model(d, 5'(n / 6), 1'b1, 1'b0, 1'b0));
        3'd4: run(d, 5'(n / 6), 1'b1, 1'b1, 1'b0, model(d, 5'(n / 6), 1'b1, 1'b1, 1'b0));
        default: run(d, 5'(n / 6), 1'b1, 1'b0, 1'b1, model(d, 5'(n / 6), 1'b1, 1'b0, 1'b1));
      endcase
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
