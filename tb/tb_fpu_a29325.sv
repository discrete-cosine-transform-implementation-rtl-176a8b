// tb_fpu_a29325: self-checking test of the floating point unit.
//
// Random operands of moderate range are applied for each of the four
// operations; the expected result is computed in double precision real
// arithmetic by the testbench and truncated to single precision.  A result
// within one unit in the last place of it passes (the unit truncates the
// aligned operand before subtracting, so it may differ by one ulp from the
// exactly truncated result).  Directed cases check zero operands, overflow,
// underflow, division by zero, NaN operands, chip enable hold and the one
// clock latency.
module tb_fpu_a29325;
  import fft_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n;
  logic      en;
  fp_op_e    op;
  fp32_t     r, s, f;
  fp_flags_t flags;

  int checks = 0;
  int failures = 0;

  fpu_a29325 dut (.clk(clk), .rst_n(rst_n), .en(en), .op(op), .r(r), .s(s),
                  .f(f), .flags(flags));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real to_real(input fp32_t v);
    logic [10:0] e;
    if (v[30:23] == 8'd0) return 0.0;
    e = 11'(v[30:23]) + 11'd896;   // rebias 127 -> 1023
    return $bitstoreal({v[31], e, v[22:0], 29'd0});
  endfunction

  // Double to single precision by truncation of the mantissa.
  function automatic fp32_t to_fp(input real x);
    logic [63:0] b;
    int e;
    b = $realtobits(x);
    if (b[62:52] == 11'd0) return 32'd0;
    e = int'(b[62:52]) - 1023 + 127;
    if (e >= 255) return {b[63], FP_INF_MAG};
    if (e <= 0) return 32'd0;
    return {b[63], e[7:0], b[51:29]};
  endfunction

  function automatic fp32_t rand_fp();
    logic [7:0] e;
    e = 8'(100 + ($urandom % 55));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  task automatic apply(input fp_op_e o, input fp32_t a, input fp32_t b);
    @(negedge clk);
    op = o;
    r = a;
    s = b;
    en = 1'b1;
    @(posedge clk);
    #1;
  endtask

  function automatic bit close(input fp32_t got, input fp32_t exp);
    int d;
    if (got == exp) return 1'b1;
    if (got[31] != exp[31]) return 1'b0;
    d = int'(got[30:0]) - int'(exp[30:0]);
    return (d >= -1 && d <= 1);
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: op=%s r=%h s=%h f=%h flags=%b", what, op.name(), r, s, f, flags);
    end
  endtask

  initial begin
    fp32_t a, b, expv;
    real ra, rb;
    rst_n = 1'b0;
    en = 1'b0;
    op = FP_ADD;
    r = '0;
    s = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // Known values.
    apply(FP_ADD, 32'h3F80_0000, 32'h4000_0000);   // 1 + 2 = 3
    check("1+2", f == 32'h4040_0000);
    apply(FP_SUB, 32'h3F80_0000, 32'h4000_0000);   // 1 - 2 = -1
    check("1-2", f == 32'hBF80_0000);
    apply(FP_MUL, 32'h4040_0000, 32'hC000_0000);   // 3 * -2 = -6
    check("3*-2", f == 32'hC0C0_0000);
    apply(FP_DIV, 32'h40C0_0000, 32'h4040_0000);   // 6 / 3 = 2
    check("6/3", f == 32'h4000_0000);
    apply(FP_SUB, 32'h4040_0000, 32'h4040_0000);   // 3 - 3 = 0
    check("3-3", f == 32'd0 && flags.zero);
    apply(FP_MUL, 32'h0000_1234, 32'h4040_0000);   // zero exponent is zero
    check("0*3", f == 32'd0 && flags.zero);
    apply(FP_ADD, 32'd0, 32'hC0C0_0000);
    check("0+-6", f == 32'hC0C0_0000);
    apply(FP_MUL, 32'h7E80_0000, 32'h7E80_0000);   // overflow
    check("ovf", f == 32'h7FFF_FFFF && flags.overflow);
    apply(FP_MUL, 32'h0180_0000, 32'h0180_0000);   // underflow
    check("unf", f == 32'd0 && flags.underflow);
    apply(FP_DIV, 32'h3F80_0000, 32'd0);           // division by zero
    check("div0", f == FP_NAN && flags.nan);
    apply(FP_ADD, 32'h7F80_0001, 32'h3F80_0000);   // NaN operand
    check("nan", flags.nan);

    // Chip enable low holds F.
    apply(FP_ADD, 32'h3F80_0000, 32'h3F80_0000);
    @(negedge clk);
    en = 1'b0;
    r = 32'h4000_0000;
    @(posedge clk);
    #1;
    check("hold", f == 32'h4000_0000);

    // Latency: a new result appears exactly one clock after its operands.
    @(negedge clk);
    en = 1'b1;
    op = FP_ADD;
    r = 32'h4080_0000;                             // 4 + 1 = 5
    s = 32'h3F80_0000;
    #1;
    check("latency-before", f == 32'h4000_0000);
    @(posedge clk);
    #1;
    check("latency-after", f == 32'h40A0_0000);

    // Random operands against the real-arithmetic reference.
    for (int i = 0; i < 4000; i++) begin
      fp_op_e o;
      a = rand_fp();
      b = rand_fp();
      if ((i % 7) == 0) b = {~a[31], a[30:23], 23'($urandom % 64) ^ a[22:0]};
      o = fp_op_e'(i % 4);
      ra = to_real(a);
      rb = to_real(b);
      unique case (o)
        FP_ADD: expv = to_fp(ra + rb);
        FP_SUB: expv = to_fp(ra - rb);
        FP_MUL: expv = to_fp(ra * rb);
        default: expv = to_fp(ra / rb);
      endcase
      apply(o, a, b);
      checks++;
      if (!close(f, expv)) begin
        failures++;
        if (failures < 20)
          $display("FAIL random %s: %h %h got %h exp %h", o.name(), a, b, f, expv);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
