// tb_fft_system: end-to-end test of the FFT data path.
//
// Through the external memory port the testbench stores the input samples
// in data RAM 0 or 1 and the weight factor of every butterfly of every stage
// (W = exp(-j 2 pi k / 2h) for butterfly offset k and span h) in the weight
// RAM, starts the address sequence generator, waits for FFT_CMP and reads
// the result from the RAM named by OSTO.  The result is compared with a
// direct DFT computed in double precision.  Cases: the 8-point example input
// whose MATLAB spectrum is also checked value by value, random 32- and
// 64-point inputs, and a 2-point input.  The clock count of each run is
// checked against N/2 + pipeline fill per stage.
module tb_fft_system;
  import fft_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n, che_n, isto, dct_pass;
  logic [3:0]        log2_pts, stage_cnt;
  logic [ADDR_W-1:0] coef_base;
  logic              fft_cmp, osto;
  logic              ext_sel, ext_chs_n, ext_rw;
  logic [1:0]        ext_bank;
  logic [ADDR_W-1:0] ext_addr;
  cplx_t             ext_wdata, ext_rdata;

  int checks = 0;
  int failures = 0;

  fft_system dut (.*);

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

  task automatic ext_write(input int bank, input int addr, input real re, input real im);
    @(negedge clk);
    ext_sel = 1'b1;
    ext_chs_n = 1'b0;
    ext_rw = 1'b0;
    ext_bank = 2'(bank);
    ext_addr = ADDR_W'(addr);
    ext_wdata = '{re: to_fp(re), im: to_fp(im)};
    @(posedge clk);
    #1;
    ext_chs_n = 1'b1;
  endtask

  task automatic ext_read(input int bank, input int addr, output real re, output real im);
    @(negedge clk);
    ext_sel = 1'b1;
    ext_chs_n = 1'b0;
    ext_rw = 1'b1;
    ext_bank = 2'(bank);
    ext_addr = ADDR_W'(addr);
    @(posedge clk);
    #1;
    ext_chs_n = 1'b1;
    re = to_real(ext_rdata.re);
    im = to_real(ext_rdata.im);
  endtask

  real xr[256], xi[256];

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

  // Run an FFT of 2^lp points held in xr/xi; returns the result spectrum.
  task automatic run_fft(input int lp, input bit bank, output real yr[256], output real yi[256]);
    int n, npts, idx, cyc;
    real mag;
    npts = 1 << lp;
    n = npts / 2;
    for (int i = 0; i < npts; i++) ext_write(int'(bank), i, xr[i], xi[i]);
    idx = 0;
    for (int s = 0; s < lp; s++) begin
      int h;
      h = n >> s;
      for (int i = 0; i < n; i++) begin
        int k;
        k = i % h;
        ext_write(2, idx, $cos(2.0 * PI * k / (2 * h)), -$sin(2.0 * PI * k / (2 * h)));
        idx++;
      end
    end
    @(negedge clk);
    ext_sel = 1'b0;
    log2_pts = 4'(lp);
    isto = bank;
    dct_pass = 1'b0;
    coef_base = '0;
    che_n = 1'b0;
    cyc = 0;
    while (!fft_cmp && cyc < 10000) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (!fft_cmp || cyc > lp * (n + int'(RAM_RD_LAT + BFLY_LAT) + 6) + 4) begin
      failures++;
      $display("FAIL: %0d-point FFT took %0d clocks (done=%0b)", npts, cyc, fft_cmp);
    end
    $display("%0d-point FFT: %0d clocks, %0d stages, result in RAM %0d", npts, cyc,
             stage_cnt, osto);
    chk_val("osto", real'(osto), real'(bank ^ lp[0]), 0.0);
    for (int i = 0; i < npts; i++) ext_read(int'(osto), i, yr[i], yi[i]);
    @(negedge clk);
    che_n = 1'b1;
    // Compare with the direct DFT.
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
      chk_val($sformatf("X%0d re", k), yr[k], sr, 1e-5 * mag + 1e-6);
      chk_val($sformatf("X%0d im", k), yi[k], si, 1e-5 * mag + 1e-6);
    end
  endtask

  initial begin
    real yr[256], yi[256];
    real ex_r[8], ex_i[8];
    rst_n = 1'b0;
    che_n = 1'b1;
    log2_pts = 4'd3;
    isto = 1'b0;
    dct_pass = 1'b0;
    coef_base = '0;
    ext_sel = 1'b1;
    ext_chs_n = 1'b1;
    ext_rw = 1'b1;
    ext_bank = '0;
    ext_addr = '0;
    ext_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // 8-point example and its published spectrum.
    xr = '{default: 0.0};
    xi = '{default: 0.0};
    xr[0] = -2; xi[0] = -1;  xr[1] = 2; xi[1] = 1;
    xr[2] = -3; xi[2] = 2;   xr[3] = 1; xi[3] = -2;
    xr[4] = 4;  xi[4] = -2;  xr[5] = 1; xi[5] = -5;
    xr[6] = 3;  xi[6] = -2;  xr[7] = 3; xi[7] = 1;
    ex_r = '{9.0, 2.2426407, -1.0, -10.0, -5.0, -6.2426407, 5.0, -10.0};
    ex_i = '{-8.0, 14.0710678, -2.0, -10.6568542, 2.0, -0.0710678, -4.0, 0.6568542};
    run_fft(3, 1'b0, yr, yi);
    for (int k = 0; k < 8; k++) begin
      chk_val("table re", yr[k], ex_r[k], 1e-4);
      chk_val("table im", yi[k], ex_i[k], 1e-4);
    end

    // Random 32-point input from RAM 1, 64-point from RAM 0, 2-point.
    for (int i = 0; i < 32; i++) begin
      xr[i] = (real'($urandom % 2001) - 1000.0) / 100.0;
      xi[i] = (real'($urandom % 2001) - 1000.0) / 100.0;
    end
    run_fft(5, 1'b1, yr, yi);
    for (int i = 0; i < 64; i++) begin
      xr[i] = (real'($urandom % 2001) - 1000.0) / 100.0;
      xi[i] = (real'($urandom % 2001) - 1000.0) / 100.0;
    end
    run_fft(6, 1'b0, yr, yi);
    xr[0] = 1.5; xi[0] = -0.5; xr[1] = 0.25; xi[1] = 2.0;
    run_fft(1, 1'b1, yr, yi);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
