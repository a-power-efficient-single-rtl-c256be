// tb_rev_usqrt_unit: exhaustive check of the 6-bit and 12-bit unsigned
// square-root units used stand-alone (root = floor(sqrt(N)),
// remainder = N - root^2), and of a 6-bit unit chained after a 6-bit unit,
// which must equal one 12-bit square root.
module tb_rev_usqrt_unit;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [5:0]  n6;
  logic [11:0] n12;
  logic [27:0] rem6, rem12, remA, remB;
  logic [23:0] root6, root12, rootA, rootB;

  rev_usqrt_unit #(.IN_BITS(6))  u6  (.radicand(n6), .rem_in('0), .root_in('0),
                                      .rem_out(rem6), .root_out(root6));
  rev_usqrt_unit #(.IN_BITS(12)) u12 (.radicand(n12), .rem_in('0), .root_in('0),
                                      .rem_out(rem12), .root_out(root12));
  rev_usqrt_unit #(.IN_BITS(6))  uA  (.radicand(n12[11:6]), .rem_in('0), .root_in('0),
                                      .rem_out(remA), .root_out(rootA));
  rev_usqrt_unit #(.IN_BITS(6))  uB  (.radicand(n12[5:0]), .rem_in(remA), .root_in(rootA),
                                      .rem_out(remB), .root_out(rootB));

  function automatic int isq(input int v);
    int r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  task automatic chk(input string what, input int got, input int exp, input int n);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s N=%0d got=%0d exp=%0d", what, n, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 64; v++) begin
      n6 = 6'(v); #1;
      chk("root6", int'(root6), isq(v), v);
      chk("rem6",  int'(rem6), v - isq(v) * isq(v), v);
    end
    for (int v = 0; v < 4096; v++) begin
      n12 = 12'(v); #1;
      chk("root12", int'(root12), isq(v), v);
      chk("rem12",  int'(rem12), v - isq(v) * isq(v), v);
      chk("root6+6", int'(rootB), isq(v), v);
      chk("rem6+6",  int'(remB), v - isq(v) * isq(v), v);
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
