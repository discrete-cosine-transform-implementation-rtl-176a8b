// tb_fft_butterfly: self-checking test of the pipelined DIF butterfly.
//
// A stream of random complex A, B and W (one butterfly per clock) is fed in
// with ie, enable and oe held high.  For every butterfly the testbench
// computes C = A + B and D = (A - B) W in double precision and requires the
// output five clocks later to match within a small relative tolerance (the
// units truncate).  A second phase drops `enable` for a few cycles in the
// middle of the stream and checks that the pipeline freezes and resumes.
module tb_fft_butterfly;
  import fft_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n, enable, ie, oe;
  cplx_t a, b, w, c, d;

  int checks = 0;
  int failures = 0;

  fft_butterfly dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real to_real(input fp32_t v);
    logic [10:0] e;
    if (v[30:23] == 8'd0) return 0.0;
    e = 11'(v[30:23]) + 11'd896;
    return $bitstoreal({v[31], e, v[22:0], 29'd0});
  endfunction

  function automatic fp32_t to_fp(input real x);
    logic [63:0] bits;
    int e;
    bits = $realtobits(x);
    if (bits[62:52] == 11'd0) return 32'd0;
    e = int'(bits[62:52]) - 1023 + 127;
    return {bits[63], e[7:0], bits[51:29]};
  endfunction

  function automatic fp32_t rnd();
    real x;
    x = (real'($urandom % 20001) - 10000.0) / 1000.0;
    return to_fp(x);
  endfunction

  localparam int NB = 200;
  real exp_cr[NB], exp_ci[NB], exp_dr[NB], exp_di[NB];

  task automatic chk(input string what, input real got, input real exp);
    real err;
    checks++;
    err = got - exp;
    if (err < 0) err = -err;
    if (err > 1e-4 + 1e-5 * (exp < 0 ? -exp : exp)) begin
      failures++;
      $display("FAIL %s: got %f exp %f", what, got, exp);
    end
  endtask

  // Present butterfly i and remember its expected outputs.
  task automatic present(input int i);
    real ar, ai, br, bi, wr, wi;
    a = '{re: rnd(), im: rnd()};
    b = '{re: rnd(), im: rnd()};
    w = '{re: rnd(), im: rnd()};
    ar = to_real(a.re); ai = to_real(a.im);
    br = to_real(b.re); bi = to_real(b.im);
    wr = to_real(w.re); wi = to_real(w.im);
    exp_cr[i] = ar + br;
    exp_ci[i] = ai + bi;
    exp_dr[i] = (ar - br) * wr - (ai - bi) * wi;
    exp_di[i] = (ai - bi) * wr + (ar - br) * wi;
  endtask

  task automatic check_out(input int i);
    chk("Cr", to_real(c.re), exp_cr[i]);
    chk("Ci", to_real(c.im), exp_ci[i]);
    chk("Dr", to_real(d.re), exp_dr[i]);
    chk("Di", to_real(d.im), exp_di[i]);
  endtask

  initial begin
    rst_n = 1'b0; enable = 1'b0; ie = 1'b0; oe = 1'b0;
    a = '0; b = '0; w = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Phase 1: continuous stream, output of butterfly i checked at i+5.
    for (int t = 0; t < 100 + BFLY_LAT; t++) begin
      @(negedge clk);
      enable = 1'b1; ie = 1'b1; oe = 1'b1;
      if (t < 100) present(t);
      if (t >= BFLY_LAT) check_out(t - BFLY_LAT);
    end
    // Latency is exactly BFLY_LAT: one clock earlier the output still held
    // the previous butterfly (checked implicitly above); check directly too.
    @(negedge clk);
    present(100);
    repeat (BFLY_LAT - 1) begin
      @(negedge clk);
      present(199);   // later butterflies, not checked
    end
    checks++;
    if (to_real(c.re) == exp_cr[100]) begin
      failures++;
      $display("FAIL: output appeared before %0d clocks", BFLY_LAT);
    end
    @(negedge clk);
    chk("latency Cr", to_real(c.re), exp_cr[100]);
    // Phase 2: freeze with enable low (and ie low) for three cycles.
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      present(110 + t);
    end
    // butterflies 110..129 presented; the pipeline holds the last ones.
    @(negedge clk);
    enable = 1'b0; ie = 1'b0;
    repeat (3) @(negedge clk);
    enable = 1'b1;
    // Outputs resume from where the pipeline stopped.
    for (int k = 0; k < BFLY_LAT - 1; k++) begin
      @(negedge clk);
      check_out(129 - (BFLY_LAT - 2) + k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
