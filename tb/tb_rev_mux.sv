// tb_rev_mux: 32:1 reversible multiplexer of 32-bit words, every select
// value with fresh random data each round.
module tb_rev_mux;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] d [32];
  logic [4:0]  sel;
  logic [31:0] q;
  rev_mux dut (.d(d), .sel(sel), .q(q));

  initial begin
    for (int r = 0; r < 20; r++) begin
      foreach (d[i]) d[i] = $urandom;
      for (int k = 0; k < 32; k++) begin
        sel = 5'(k); #1;
        checks++;
        if (q !== d[k]) begin failures++; $display("FAIL sel=%0d q=%h exp=%h", k, q, d[k]); end
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
