// tb_rev_lzd: 32-bit leading zero detector for every leading-one position
// (with random bits below it) and for zero.
module tb_rev_lzd;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] d;
  logic [5:0]  count;
  logic        zero;
  rev_lzd #(.W(32)) dut (.d(d), .count(count), .zero(zero));

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int p = 0; p < 32; p++) begin
        d = (32'd1 << p) | (32'($urandom) & ((32'd1 << p) - 1));
        #1;
        checks++;
        if (count !== 6'(31 - p) || zero !== 1'b0) begin
          failures++; $display("FAIL d=%h count=%0d", d, count);
        end
      end
    end
    d = 0; #1;
    checks++;
    if (count !== 6'd32 || zero !== 1'b1) begin failures++; $display("FAIL zero"); end
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
