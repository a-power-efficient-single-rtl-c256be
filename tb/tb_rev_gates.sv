// tb_rev_gates: exhaustive check of the Feynman, TR and Fredkin gates
// against their truth-table formulas.
module tb_rev_gates;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic a, b, c;
  logic fp, fq, tp, tq, tr, rp, rq, rr;
  rev_feynman u_fg (.a(a), .b(b), .p(fp), .q(fq));
  rev_tr      u_tr (.a(a), .b(b), .c(c), .p(tp), .q(tq), .r(tr));
  rev_fredkin u_fr (.a(a), .b(b), .c(c), .p(rp), .q(rq), .r(rr));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%b b=%b c=%b got=%b exp=%b", what, a, b, c, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check("fg.p", fp, a);         check("fg.q", fq, a != b);
      check("tr.p", tp, a);         check("tr.q", tq, a != b);
      check("tr.r", tr, (a && !b) != c);
      check("fr.p", rp, a);
      check("fr.q", rq, a ? c : b); check("fr.r", rr, a ? b : c);
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
