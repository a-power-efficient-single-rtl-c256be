// tb_fp_dsp_top: end-to-end test of the whole datapath at its default
// parameters (32-tap filter). Part 1 drives the arithmetic unit through every
// operator and every shifter mode, including normalisation shifts, exponent
// overflow and underflow, zero operands and odd/even square-root exponents.
// Part 2 streams a sample sequence through the FIR filter, pausing it
// (r2 = 0) in the middle of a sample period and resetting it once, and checks
// every output against a reference sum. Each mechanism is counted; one that
// never occurred counts as a failure.
module tb_fp_dsp_top;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  localparam int TAPS = 32;
  localparam int NSAMP = 36;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  // arithmetic unit
  logic [31:0] in1, in2, in3, in4, out;
  au_op_e      sel;
  logic        h1, sub, lef, sra, rot;
  logic [4:0]  select;
  // filter
  logic        r1, r2;
  fp32_t       x, y;
  fp32_t       h [TAPS];
  logic [4:0]  s;
  logic        y_valid;

  fp_dsp_top dut (
    .in1(in1), .in2(in2), .in3(in3), .in4(in4), .sel(sel), .h1(h1), .sub(sub),
    .lef(lef), .sra(sra), .rot(rot), .select(select), .out(out),
    .clk(clk), .r1(r1), .r2(r2), .x(x), .h(h), .s(s), .y(y), .y_valid(y_valid));

  // mechanism counters
  typedef enum int {
    M_ADD, M_EFF_SUB, M_CANCEL, M_MUL_NORM, M_MUL, M_DIV, M_SQRT_ODD, M_SQRT_EVEN,
    M_SHR_LOG, M_SHR_ARI, M_ROT_R, M_SHL_LOG, M_SHL_ARI, M_ROT_L, M_OVERFLOW,
    M_UNDERFLOW, M_ZERO_OP, M_FIR_OUT, M_FIR_PAUSE, M_FIR_RESET, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"add", "effective subtract", "cancellation",
    "multiplier normalise shift", "multiply", "divide", "sqrt odd exponent",
    "sqrt even exponent", "logical right shift", "arithmetic right shift",
    "right rotate", "logical left shift", "arithmetic left shift", "left rotate",
    "overflow", "underflow", "zero operand", "filter output", "filter pause",
    "filter reset"};

  task automatic chk(input string what, input logic [31:0] e, input logic allow_below);
    #1;
    checks++;
    if (out !== e && !(allow_below && out === e - 32'd1)) begin
      failures++;
      $display("FAIL %s in1=%h in2=%h in3=%h in4=%h out=%h exp=%h", what, in1, in2, in3, in4, out, e);
    end
  endtask

  function automatic logic [31:0] shmodel(input logic [31:0] d, input logic [4:0] sh,
                                          input logic l, input logic ar, input logic rt);
    if (rt && !l)  return (d >> sh) | (d << (6'd32 - 6'(sh)));
    if (rt && l)   return (d << sh) | (d >> (6'd32 - 6'(sh)));
    if (!l && ar)  return 32'($signed(d) >>> sh);
    if (!l)        return d >> sh;
    if (ar)        return {d[31], 31'(d << sh)};
    return d << sh;
  endfunction

  // filter reference
  logic [31:0] xs [NSAMP];
  logic [31:0] expy [NSAMP];
  int          outputs = 0;

  always @(posedge clk) begin
    #2;
    if (y_valid) begin
      checks++;
      if (outputs >= NSAMP || y !== expy[outputs]) begin
        failures++; $display("FAIL filter y(%0d)=%h", outputs, y);
      end
      outputs++;
      mech[M_FIR_OUT]++;
    end
  end

  initial begin
    foreach (mech[i]) mech[i] = 0;
    r1 = 1; r2 = 0; s = 0; x = 0;
    foreach (h[k]) h[k] = 0;
    in1 = 0; in2 = 0; in3 = 0; in4 = 0; sel = OP_ADDSUB; h1 = 0; sub = 0;
    lef = 0; sra = 0; rot = 0; select = 0;

    // ---------------- part 1: arithmetic unit ----------------
    for (int n = 0; n < 600; n++) begin
      logic [31:0] e;
      logic [47:0] pm;
      in1 = rand_fp(40, 215); in2 = rand_fp(40, 215);
      if (n % 7 == 0) in2 = {~in1[31], in1[30:0]};            // x + (-x)
      if (n % 11 == 0) in1 = 32'h0;
      if (n % 13 == 0) begin in2 = in1; in2[22:0] = 23'($urandom % 8); end
      // add / subtract (keep exponents close so the reference is exact)
      begin
        logic [31:0] b2;
        b2 = in2;
        if (in1[30:23] != 0) b2[30:23] = 8'(int'(in1[30:23]) + int'($urandom % 21) - 10);
        in2 = b2;
      end
      sel = OP_ADDSUB;
      sub = 1'($urandom);
      e = ref_add(in1, {in2[31] ^ sub, in2[30:0]});
      chk("addsub", e, 1'b0);
      if (in1[30:23] == 0 || in2[30:23] == 0) mech[M_ZERO_OP]++;
      else if (in1[31] != (in2[31] ^ sub)) begin
        mech[M_EFF_SUB]++;
        if (e == 0 || e[30:23] + 8'd2 < in1[30:23]) mech[M_CANCEL]++;
      end else mech[M_ADD]++;
      // multiply
      sel = OP_MUL;
      e = ref_mul(in1, in2);
      chk("mul", e, 1'b0);
      pm = 48'({1'b1, in1[22:0]}) * 48'({1'b1, in2[22:0]});
      if (in1[30:23] != 0 && in2[30:23] != 0) begin
        mech[M_MUL]++;
        if (pm[47]) mech[M_MUL_NORM]++;
        if (int'(in1[30:23]) + int'(in2[30:23]) - 127 + int'(pm[47]) >= 255) mech[M_OVERFLOW]++;
        if (int'(in1[30:23]) + int'(in2[30:23]) - 127 + int'(pm[47]) <= 0)   mech[M_UNDERFLOW]++;
      end
      // divide
      sel = OP_DIV;
      chk("div", ref_div(in1, in2), 1'b1);
      if (in1[30:23] != 0 && in2[30:23] != 0) mech[M_DIV]++;
      // shifter
      sel = OP_SHSQ; h1 = 1'b0;
      in3 = $urandom; select = 5'($urandom);
      lef = 1'(n % 2); sra = 1'((n / 2) % 2); rot = 1'((n / 4) % 3 == 0);
      chk("shift", shmodel(in3, select, lef, sra, rot), 1'b0);
      if (rot) mech[lef ? M_ROT_L : M_ROT_R]++;
      else if (lef) mech[sra ? M_SHL_ARI : M_SHL_LOG]++;
      else mech[sra ? M_SHR_ARI : M_SHR_LOG]++;
      // square root
      h1 = 1'b1;
      in4 = rand_fp(1, 254); in4[31] = 1'b0;
      chk("sqrt", ref_sqrt(in4), 1'b0);
      mech[in4[23] ? M_SQRT_EVEN : M_SQRT_ODD]++;   // biased odd = unbiased even
    end

    // ---------------- part 2: FIR filter ----------------
    foreach (h[k]) h[k] = rand_fp(120, 128);
    for (int n = 0; n < NSAMP; n++) begin
      logic [31:0] acc;
      xs[n] = rand_fp(122, 130);
      acc = 0;
      for (int k = 0; k < TAPS; k++)
        acc = ref_add(acc, ref_mul((n - k >= 0) ? xs[n - k] : 32'h0, h[k]));
      expy[n] = acc;
    end
    @(posedge clk); #1;
    r1 = 0; r2 = 1;
    mech[M_FIR_RESET]++;
    for (int n = 0; n < NSAMP + 1; n++) begin
      for (int k = 0; k < TAPS; k++) begin
        s = 5'(k);
        x = (n < NSAMP) ? xs[n] : 32'h0;
        if (n == 5 && k == 9) begin                        // pause mid-period
          r2 = 0;
          repeat (3) @(posedge clk);
          #1;
          r2 = 1;
          mech[M_FIR_PAUSE]++;
        end
        @(posedge clk); #1;
      end
    end
    checks++;
    if (outputs != NSAMP) begin failures++; $display("FAIL %0d filter outputs", outputs); end

    foreach (mech[i]) begin
      $display("mechanism %-28s %0d", mech_name[i], mech[i]);
      checks++;
      if (mech[i] == 0) begin failures++; $display("FAIL mechanism never exercised: %s", mech_name[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
