// tb_dct_system: end-to-end test of the DCT processor at its default sizes.
//
// The testbench acts as the host: for each run it computes the weight
// factors W = exp(-j 2 pi k / 2h) of every butterfly of every stage and, for
// a DCT, H(k) = alpha(k) exp(-j pi k / 2N), streams samples, weights and
// H(k) into the design with random gaps, collects the result stream and
// compares it with a direct DFT or a direct DCT-II
//   V(k) = alpha(k) sum_m u(m) cos(pi (2m+1) k / 2N)
// computed in double precision.  Runs:
//   - the 8-point example input, also checked against its published
//     spectrum value by value;
//   - a random 64-point FFT (the largest the 256-word weight RAM holds);
//   - 8- and 32-point DCTs by the separate DCT pipeline;
//   - 8- and 32-point DCTs by the extra butterfly pass;
//   - a 2-point FFT.
// It counts the mechanisms of the design and fails if one never happened:
// FFT stages, ping-pong swaps of the data RAMs, butterflies overlapped in
// the pipeline (input and output register loading in the same clock), the
// zero padding of the DCT input, host back-pressure, runs of the DCT
// pipeline and passes of the butterfly with B forced to zero.
module tb_dct_system;
  import fft_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n, start, busy, done, in_valid, in_ready, out_valid;
  sys_mode_e         mode;
  logic [3:0]        log2_pts, stage_cnt;
  cplx_t             in_data, out_data;
  logic [ADDR_W-1:0] out_index;

  int checks = 0;
  int failures = 0;

  dct_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
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

  task automatic chk_val(input string what, input real got, input real exp, input real tol);
    real err;
    checks++;
    err = got - exp;
    if (err < 0) err = -err;
    if (err > tol) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %f exp %f", what, got, exp);
    end
  endtask

  // Mechanism counters.
  int n_stage = 0, n_swap = 0, n_overlap = 0, n_pad = 0, n_stall = 0;
  int n_fft = 0, n_dct_pipe = 0, n_dct_bfly = 0;
  logic [3:0] stage_q = '0;
  logic       che_q = 1'b1;

  always @(posedge clk) begin
    stage_q <= stage_cnt;
    che_q   <= dut.che_n;
    if (stage_cnt != stage_q && stage_cnt != 0) n_stage <= n_stage + 1;
    if (dut.u_fft.u_seq.rd_en && dut.u_fft.u_seq.wr_en &&
        dut.u_fft.u_seq.rd_bank != dut.u_fft.u_seq.wr_bank) n_swap <= n_swap + 1;
    if (dut.u_fft.u_ctl.ie && dut.u_fft.u_ctl.oe) n_overlap <= n_overlap + 1;
    if (dut.u_uc.pad) n_pad <= n_pad + 1;
    if (in_valid && !in_ready) n_stall <= n_stall + 1;
    if (rst_n && che_q && !dut.che_n) begin
      if (dut.dct_pass) n_dct_bfly <= n_dct_bfly + 1;
      else              n_fft <= n_fft + 1;
    end
    if (dut.u_dct.done) n_dct_pipe <= n_dct_pipe + 1;
  end

  // Result collection.
  cplx_t res [256];
  int    n_res = 0;
  int    res_dup = 0;
  bit    seen [256];

  always @(posedge clk) begin
    if (out_valid) begin
      if (seen[out_index]) res_dup <= res_dup + 1;
      seen[out_index] = 1'b1;
      res[out_index]  = out_data;
      n_res <= n_res + 1;
    end
  end

  // Host stream: push one word, with a random gap before it.
  task automatic push(input real re, input real im);
    int cyc;
    in_valid = 1'b0;
    while ($urandom % 3 == 0) @(negedge clk);
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

  real xr[256], xi[256];
  real yr[256], yi[256];

  // Start a run, stream its inputs and wait for done.
  task automatic run(input sys_mode_e m, input int lp);
    int npts, n, nin, cyc;
    npts = 1 << lp;
    n = npts / 2;
    nin = (m == MODE_FFT) ? npts : n;
    for (int i = 0; i < 256; i++) seen[i] = 1'b0;
    n_res = 0;
    @(negedge clk);
    mode = m;
    log2_pts = 4'(lp);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int i = 0; i < nin; i++) push(xr[i], (m == MODE_FFT) ? xi[i] : 0.0);
    for (int s = 0; s < lp; s++) begin
      int h;
      h = n >> s;
      for (int i = 0; i < n; i++)
        push($cos(2.0 * PI * (i % h) / (2 * h)), -$sin(2.0 * PI * (i % h) / (2 * h)));
    end
    if (m != MODE_FFT) begin
      for (int k = 0; k < n; k++) begin
        real a;
        a = (k == 0) ? $sqrt(1.0 / n) : $sqrt(2.0 / n);
        push(a * $cos(PI * k / (2.0 * n)), -a * $sin(PI * k / (2.0 * n)));
      end
    end
    cyc = 0;
    while (!done && cyc < 100000) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL: mode %0d, %0d points never finished", m, npts);
    end
    @(negedge clk);
    checks++;
    if (n_res != (m == MODE_FFT ? npts : n) || res_dup != 0) begin
      failures++;
      $display("FAIL: mode %0d: %0d results, %0d repeated", m, n_res, res_dup);
    end
    for (int i = 0; i < 256; i++) begin
      yr[i] = to_real(res[i].re);
      yi[i] = to_real(res[i].im);
    end
    $display("mode %0d, log2_pts %0d: done after %0d clocks of loading and computing", m, lp, cyc);
  endtask

  task automatic check_fft(input int lp);
    int npts;
    real mag;
    npts = 1 << lp;
    mag = 0.0;
    for (int i = 0; i < npts; i++) mag += (xr[i] < 0 ? -xr[i] : xr[i]) + (xi[i] < 0 ? -xi[i] : xi[i]);
    for (int k = 0; k < npts; k++) begin
      real sr, si;
      sr = 0.0;
      si = 0.0;
      for (int m = 0; m < npts; m++) begin
        real ang;
        ang = -2.0 * PI * real'((k * m) % npts) / real'(npts);
        sr += xr[m] * $cos(ang) - xi[m] * $sin(ang);
        si += xr[m] * $sin(ang) + xi[m] * $cos(ang);
      end
      chk_val($sformatf("FFT%0d X%0d re", npts, k), yr[k], sr, 1e-5 * mag + 1e-6);
      chk_val($sformatf("FFT%0d X%0d im", npts, k), yi[k], si, 1e-5 * mag + 1e-6);
    end
  endtask

  task automatic check_dct(input int n);
    real mag;
    mag = 0.0;
    for (int i = 0; i < n; i++) mag += (xr[i] < 0 ? -xr[i] : xr[i]);
    for (int k = 0; k < n; k++) begin
      real v, a;
      a = (k == 0) ? $sqrt(1.0 / n) : $sqrt(2.0 / n);
      v = 0.0;
      for (int m = 0; m < n; m++) v += xr[m] * $cos(PI * real'((2 * m + 1) * k) / (2.0 * n));
      v = a * v;
      chk_val($sformatf("DCT%0d V%0d", n, k), yr[k], v, 1e-5 * mag + 1e-6);
      chk_val($sformatf("DCT%0d V%0d im", n, k), yi[k], 0.0, 0.0);
    end
  endtask

  task automatic randomize_x(input int n);
    for (int i = 0; i < n; i++) begin
      xr[i] = (real'($urandom % 2001) - 1000.0) / 100.0;
      xi[i] = (real'($urandom % 2001) - 1000.0) / 100.0;
    end
  endtask

  task automatic chk_count(input string what, input int c);
    checks++;
    $display("%-40s %0d", what, c);
    if (c == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    real ex_r[8], ex_i[8];
    rst_n = 1'b0;
    start = 1'b0;
    mode = MODE_FFT;
    log2_pts = 4'd3;
    in_valid = 1'b0;
    in_data = '0;
    for (int i = 0; i < 256; i++) begin
      res[i] = '0;
      seen[i] = 1'b0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // 8-point example and its published spectrum.
    xr[0] = -2; xi[0] = -1;  xr[1] = 2; xi[1] = 1;
    xr[2] = -3; xi[2] = 2;   xr[3] = 1; xi[3] = -2;
    xr[4] = 4;  xi[4] = -2;  xr[5] = 1; xi[5] = -5;
    xr[6] = 3;  xi[6] = -2;  xr[7] = 3; xi[7] = 1;
    ex_r = '{9.0, 2.2426407, -1.0, -10.0, -5.0, -6.2426407, 5.0, -10.0};
    ex_i = '{-8.0, 14.0710678, -2.0, -10.6568542, 2.0, -0.0710678, -4.0, 0.6568542};
    run(MODE_FFT, 3);
    check_fft(3);
    for (int k = 0; k < 8; k++) begin
      chk_val("table re", yr[k], ex_r[k], 1e-4);
      chk_val("table im", yi[k], ex_i[k], 1e-4);
    end

    randomize_x(64);
    run(MODE_FFT, 6);
    check_fft(6);

    randomize_x(8);
    run(MODE_DCT_PIPE, 4);
    check_dct(8);
    run(MODE_DCT_BFLY, 4);
    check_dct(8);

    randomize_x(32);
    run(MODE_DCT_PIPE, 6);
    check_dct(32);
    randomize_x(32);
    run(MODE_DCT_BFLY, 6);
    check_dct(32);

    xr[0] = 1.5; xi[0] = -0.5; xr[1] = 0.25; xi[1] = 2.0;
    run(MODE_FFT, 1);
    check_fft(1);

    @(negedge clk);
    chk_count("FFT runs", n_fft);
    chk_count("FFT stages after the first", n_stage);
    chk_count("clocks reading one RAM, writing the other", n_swap);
    chk_count("clocks with overlapped butterflies", n_overlap);
    chk_count("zero-padded DCT input words", n_pad);
    chk_count("clocks of host back-pressure", n_stall);
    chk_count("DCT pipeline runs", n_dct_pipe);
    chk_count("DCT butterfly passes", n_dct_bfly);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
