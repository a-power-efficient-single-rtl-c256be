// tb_fp_mac: multiply-accumulate unit. Accumulates random products and
// checks the accumulator after every clock against a reference sum built
// with the reference multiply and add (one product per cycle, result one
// edge later). Also checks clear (r1), hold (r2 = 0) and restart (start).
module tb_fp_mac;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        r1, r2, start;
  logic [31:0] a, b, out, acc;
  fp_mac dut (.clk(clk), .r1(r1), .r2(r2), .start(start), .a(a), .b(b), .out(out));

  task automatic chk(input string what);
    checks++;
    if (out !== acc) begin
      failures++;
      $display("FAIL %s out=%h exp=%h", what, out, acc);
    end
  endtask

  initial begin
    r1 = 1; r2 = 0; start = 0; a = 0; b = 0; acc = 0;
    @(posedge clk); #1;
    r1 = 0;
    chk("clear");
    for (int n = 0; n < 400; n++) begin
      a = rand_fp(120, 134); b = rand_fp(120, 134);
      if (n % 4 == 0) a[31] = b[31];          // mostly growing sums
      r2    = (n % 17 != 5);
      start = (n % 50 == 0);
      @(posedge clk); #1;
      if (r2) acc = ref_add(start ? 32'h0 : acc, ref_mul(a, b));
      chk(r2 ? "accumulate" : "hold");
    end
    r1 = 1; @(posedge clk); #1; r1 = 0; acc = 0;
    chk("clear again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
