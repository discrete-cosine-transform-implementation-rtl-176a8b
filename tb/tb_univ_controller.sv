// tb_univ_controller: self-checking test of the universal controller on its
// own, with behavioural stand-ins for everything it drives.
//
// The testbench models the FFT system's memory port (data RAMs 0 and 1 and
// the weight RAM, one-clock read), the address sequence generator's
// handshake (FFT_CMP rises a fixed time after CHE falls, OSTO follows the
// ping-pong rule: the result is in the input RAM after an even number of
// stages) and the DCT pipeline's read / result sequence.  The stand-in
// "transforms" are bit-pattern maps, so every result word tells where it
// came from.  For each mode (FFT, DCT by pipeline, DCT by extra butterfly
// pass) it checks: the samples, the zero padding, the weights and the H(k)
// factors land at the right addresses; the run parameters (LEN, ISTO,
// DCT pass, coefficient base) at each start; that CHE is released between
// the FFT and the DCT pass; that the results leave from the RAM named by
// OSTO in index order, one per clock; and that `done` follows.
module tb_univ_controller;
  import fft_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n, start, busy, done, in_valid, in_ready, out_valid;
  sys_mode_e         mode;
  logic [3:0]        log2_pts, len;
  cplx_t             in_data, out_data;
  logic [ADDR_W-1:0] out_index;
  logic              che_n, isto, dct_pass, fft_cmp, osto;
  logic [ADDR_W-1:0] coef_base;
  logic              ext_sel, ext_chs_n, ext_rw;
  logic [1:0]        ext_bank;
  logic [ADDR_W-1:0] ext_addr;
  cplx_t             ext_wdata, ext_rdata;
  logic              dp_start, dp_done, dp_mem_chs_n, dp_v_valid, h_we;
  logic [ADDR_W-1:0] dp_mem_addr, dp_v_index, h_addr;
  logic [ADDR_W:0]   dp_n;
  fp32_t             dp_v_data;
  cplx_t             h_wdata;

  int checks = 0;
  int failures = 0;

  univ_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  // Stand-in RAMs behind the memory port.
  cplx_t mem [3][256];
  cplx_t hmem [256];

  always @(posedge clk) begin
    if (ext_sel && !ext_chs_n) begin
      if (ext_rw) ext_rdata <= mem[ext_bank][ext_addr];
      else        mem[ext_bank][ext_addr] <= ext_wdata;
    end
    if (h_we) hmem[h_addr] <= h_wdata;
  end

  function automatic cplx_t fft_map(input cplx_t v);
    return '{re: v.re ^ 32'h1234_5678, im: v.im ^ 32'h0F0F_0F0F};
  endfunction

  function automatic cplx_t dct_map(input cplx_t u, input cplx_t w);
    return '{re: u.re ^ w.re, im: u.im ^ w.im};
  endfunction

  // Stand-in for the address sequence generator and the butterfly.
  int runs = 0;
  logic che_q = 1'b1;
  int run_clk;
  logic [3:0] run_len;
  logic run_isto, run_dct;
  logic [ADDR_W-1:0] run_base;

  // Checks made at each start, set by the test sequence.
  int exp_len, exp_nw, n_half;
  int exp_run_dct [2];
  logic last_osto;

  always @(posedge clk) begin
    che_q <= che_n;
    if (!rst_n || che_n) begin
      fft_cmp <= 1'b0;
      run_clk = 0;
    end else begin
      if (che_q) begin
        // falling edge of CHE: a run starts with the present parameters
        run_len  = len;
        run_isto = isto;
        run_dct  = dct_pass;
        run_base = coef_base;
        chk(int'(len) == exp_len, $sformatf("LEN %0d exp %0d", len, exp_len));
        chk(run_dct == 1'(exp_run_dct[runs]), $sformatf("run %0d dct_pass %0b", runs, run_dct));
        if (run_dct) begin
          chk(isto == last_osto, "DCT pass reads the RAM holding the FFT result");
          chk(int'(coef_base) == exp_nw, $sformatf("coef base %0d exp %0d", coef_base, exp_nw));
        end else begin
          chk(isto == 1'b0 && coef_base == '0, "FFT run from RAM 0 with weights at 0");
        end
        runs++;
      end
      run_clk++;
      if (run_clk == 20 && !fft_cmp) begin
        logic o;
        if (run_dct) begin
          o = ~run_isto;
          for (int k = 0; k < n_half; k++) begin
            mem[{1'b0, o}][k]          = mem[{1'b0, run_isto}][k];
            mem[{1'b0, o}][n_half + k] = dct_map(mem[{1'b0, run_isto}][k], mem[2][int'(run_base) + k]);
          end
        end else begin
          o = run_isto ^ run_len[0];
          for (int i = 0; i < (1 << run_len); i++) mem[{1'b0, o}][i] = fft_map(mem[{1'b0, run_isto}][i]);
        end
        osto      <= o;
        last_osto = o;
        fft_cmp   <= 1'b1;
      end
    end
  end

  // Stand-in for the DCT pipeline: one read per clock, result one clock later.
  logic dbusy = 1'b0, pend = 1'b0;
  int dk = 0;
  logic [ADDR_W-1:0] pk;
  int dp_runs = 0;

  assign dp_mem_chs_n = !(dbusy && dk < int'(dp_n));
  assign dp_mem_addr  = ADDR_W'(dk);
  assign dp_v_valid   = pend;
  assign dp_v_index   = pk;
  assign dp_v_data    = ext_rdata.re ^ hmem[pk].re;

  always @(posedge clk) begin
    pend    <= 1'b0;
    dp_done <= 1'b0;
    if (dp_start) begin
      dbusy <= 1'b1;
      dk    <= 0;
      dp_runs++;
      chk(int'(dp_n) == n_half, "DCT pipeline length");
    end else if (dbusy) begin
      if (!dp_mem_chs_n) begin
        dk   <= dk + 1;
        pend <= 1'b1;
        pk   <= dp_mem_addr;
      end else if (!pend) begin
        dbusy   <= 1'b0;
        dp_done <= 1'b1;
      end
    end
  end

  function automatic fp32_t rnd_word();
    return {$urandom} | 32'h0080_0000;
  endfunction

  // One complete run in the given mode.
  task automatic run(input sys_mode_e m, input int lp);
    int npts, nw, nh, nin, got, last_t, cyc;
    cplx_t x [256], w [256], h [256];
    cplx_t u [256];
    bit dct;
    dct = (m != MODE_FFT);
    npts = 1 << lp;
    nh = npts / 2;
    nw = nh * lp;
    exp_len = lp;
    exp_nw = nw;
    n_half = nh;
    exp_run_dct[0] = 0;
    exp_run_dct[1] = 1;
    runs = 0;
    dp_runs = 0;
    for (int i = 0; i < 256; i++) begin
      x[i] = '{re: rnd_word(), im: rnd_word()};
      w[i] = '{re: rnd_word(), im: rnd_word()};
      h[i] = '{re: rnd_word(), im: rnd_word()};
    end
    nin = dct ? nh : npts;
    @(negedge clk);
    mode = m;
    log2_pts = 4'(lp);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    // Host stream with random gaps: samples, weights, H(k).
    for (int i = 0; i < nin + nw + (dct ? nh : 0); i++) begin
      in_valid = 1'b0;
      while ($urandom % 4 == 0) @(negedge clk);
      in_valid = 1'b1;
      if (i < nin)            in_data = x[i];
      else if (i < nin + nw)  in_data = w[i - nin];
      else                    in_data = h[i - nin - nw];
      cyc = 0;
      while (!in_ready && cyc < 200) begin
        @(negedge clk);
        cyc++;
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    // Wait for the first run to start, then check what was loaded.
    cyc = 0;
    while (runs == 0 && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    chk(runs == 1, "FFT run started");
    for (int i = 0; i < npts; i++) begin
      cplx_t e;
      if (!dct)        e = x[i];
      else if (i < nh) e = '{re: x[i].re, im: FP_ZERO};
      else             e = '0;
      u[i] = fft_map(e);
      chk(mem[0][i] == e, $sformatf("sample %0d in RAM 0", i));
    end
    for (int i = 0; i < nw; i++) chk(mem[2][i] == w[i], $sformatf("weight %0d", i));
    if (m == MODE_DCT_BFLY)
      for (int k = 0; k < nh; k++) chk(mem[2][nw + k] == h[k], $sformatf("H %0d in weight RAM", k));
    if (m == MODE_DCT_PIPE)
      for (int k = 0; k < nh; k++) chk(hmem[k] == h[k], $sformatf("H %0d in pipeline RAM", k));
    // Collect the results.
    got = 0;
    last_t = -1;
    cyc = 0;
    while (!done && cyc < 5000) begin
      if (out_valid) begin
        cplx_t e;
        unique case (m)
          MODE_FFT:      e = u[got];
          MODE_DCT_BFLY: e = '{re: dct_map(u[got], h[got]).re, im: FP_ZERO};
          default:       e = '{re: u[got].re ^ h[got].re, im: FP_ZERO};
        endcase
        chk(out_data == e && int'(out_index) == got,
            $sformatf("mode %0d result %0d: %h exp %h idx %0d", m, got, out_data, e, out_index));
        if (last_t >= 0) chk(cyc == last_t + 1, "one result per clock");
        last_t = cyc;
        got++;
      end
      @(negedge clk);
      cyc++;
    end
    chk(done, "done pulse");
    chk(got == (dct ? nh : npts), $sformatf("mode %0d: %0d results", m, got));
    chk(runs == (m == MODE_DCT_BFLY ? 2 : 1), $sformatf("mode %0d: %0d generator runs", m, runs));
    chk(dp_runs == (m == MODE_DCT_PIPE ? 1 : 0), "DCT pipeline used only in its mode");
    @(negedge clk);
    chk(!busy && che_n, "idle after done");
  endtask

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    mode = MODE_FFT;
    log2_pts = 4'd3;
    in_valid = 1'b0;
    in_data = '0;
    osto = 1'b0;
    ext_rdata = '0;
    pk = '0;
    dp_done = 1'b0;
    for (int b = 0; b < 3; b++) for (int i = 0; i < 256; i++) mem[b][i] = '0;
    for (int i = 0; i < 256; i++) hmem[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(MODE_FFT, 3);
    run(MODE_FFT, 6);
    run(MODE_DCT_BFLY, 4);
    run(MODE_DCT_PIPE, 5);
    run(MODE_DCT_BFLY, 5);
    run(MODE_DCT_PIPE, 2);
    run(MODE_FFT, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
