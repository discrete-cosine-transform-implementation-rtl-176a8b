// tb_fft_workloads: the evaluated FFT sizes, run on the whole design.
//
// The full pipeline butterfly is rated at one butterfly per time step with
// four steps of pipeline fill per stage: (N/2 + 4) steps per stage, so
// 516 x 10 = 5160 steps for 1024 points and (4 + 4) x 3 = 24 for 8 points.
// This testbench builds dct_system with 13-bit RAM addresses (8192-word
// RAMs; a 1024-point FFT needs 1024 data words and 512 x 10 = 5120 weight
// words) and runs a random 1024-point FFT and the 8-point example through
// the host stream.  It checks every output bin against a direct DFT in
// double precision, and the clocks from the start of the address sequence
// generator to FFT completion against the rated step count plus this
// design's per-stage overhead (RAM read, synchronous controller handoff:
// at most 8 clocks per stage).  Both counts are printed.
module tb_fft_workloads;
  import fft_pkg::*;

  localparam int unsigned AW = 13;

  logic              clk = 1'b0;
  logic              rst_n, start, busy, done, in_valid, in_ready, out_valid;
  sys_mode_e         mode;
  logic [3:0]        log2_pts, stage_cnt;
  cplx_t             in_data, out_data;
  logic [AW-1:0]     out_index;

  int checks = 0;
  int failures = 0;

  dct_system #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real PI = 3.14159265358979323846;

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
    if (e <= 0) return 32'd0;
    return {bits[63], e[7:0], bits[51:29]};
  endfunction

  // Clocks from CHE falling to FFT_CMP.
  int   run_clocks = 0;
  logic counting = 1'b0;
  always @(posedge clk) begin
    if (!dut.che_n && !dut.fft_cmp) begin
      counting   <= 1'b1;
      run_clocks <= counting ? run_clocks + 1 : 1;
    end else begin
      counting <= 1'b0;
    end
  end

  cplx_t res [1024];
  always @(posedge clk) if (out_valid && out_index < 1024) res[out_index] <= out_data;

  task automatic push(input real re, input real im);
    int cyc;
    in_valid = 1'b1;
    in_data = '{re: to_fp(re), im: to_fp(im)};
    cyc = 0;
    while (!in_ready && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  real xr[1024], xi[1024];
  real cs[1024], sn[1024];

  task automatic run_fft(input int lp);
    int npts, n, cyc, rated, limit;
    real mag;
    npts = 1 << lp;
    n = npts / 2;
    @(negedge clk);
    mode = MODE_FFT;
    log2_pts = 4'(lp);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int i = 0; i < npts; i++) push(xr[i], xi[i]);
    for (int s = 0; s < lp; s++) begin
      int h;
      h = n >> s;
      for (int i = 0; i < n; i++)
        push($cos(2.0 * PI * (i % h) / (2 * h)), -$sin(2.0 * PI * (i % h) / (2 * h)));
    end
    cyc = 0;
    while (!done && cyc < 200000) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL: %0d-point FFT never finished", npts);
    end
    @(negedge clk);
    rated = (n + 4) * lp;
    limit = (n + 4 + 8) * lp;
    $display("%0d-point FFT: %0d clocks from start to completion; rated %0d steps", npts,
             run_clocks, rated);
    checks++;
    if (run_clocks < rated || run_clocks > limit) begin
      failures++;
      $display("FAIL: %0d clocks outside %0d .. %0d", run_clocks, rated, limit);
    end
    // Direct DFT with a table of the npts-th roots of unity.
    for (int i = 0; i < npts; i++) begin
      cs[i] = $cos(2.0 * PI * i / npts);
      sn[i] = $sin(2.0 * PI * i / npts);
    end
    mag = 0.0;
    for (int i = 0; i < npts; i++) mag += (xr[i] < 0 ? -xr[i] : xr[i]) + (xi[i] < 0 ? -xi[i] : xi[i]);
    for (int k = 0; k < npts; k++) begin
      real sr, si, er, ei;
      sr = 0.0;
      si = 0.0;
      for (int m = 0; m < npts; m++) begin
        int t;
        t = (k * m) % npts;
        // x(m) exp(-j 2 pi t / npts)
        sr += xr[m] * cs[t] + xi[m] * sn[t];
        si += xi[m] * cs[t] - xr[m] * sn[t];
      end
      er = to_real(res[k].re) - sr;
      ei = to_real(res[k].im) - si;
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      checks++;
      if (er > 1e-5 * mag + 1e-6 || ei > 1e-5 * mag + 1e-6) begin
        failures++;
        if (failures < 20) $display("FAIL X%0d: got %f, %f exp %f, %f", k,
                                    to_real(res[k].re), to_real(res[k].im), sr, si);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    mode = MODE_FFT;
    log2_pts = 4'd3;
    in_valid = 1'b0;
    in_data = '0;
    for (int i = 0; i < 1024; i++) res[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < 1024; i++) begin
      xr[i] = (real'($urandom % 2001) - 1000.0) / 100.0;
      xi[i] = (real'($urandom % 2001) - 1000.0) / 100.0;
    end
    run_fft(10);

    xr[0] = -2; xi[0] = -1;  xr[1] = 2; xi[1] = 1;
    xr[2] = -3; xi[2] = 2;   xr[3] = 1; xi[3] = -2;
    xr[4] = 4;  xi[4] = -2;  xr[5] = 1; xi[5] = -5;
    xr[6] = 3;  xi[6] = -2;  xr[7] = 3; xi[7] = 1;
    run_fft(3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
