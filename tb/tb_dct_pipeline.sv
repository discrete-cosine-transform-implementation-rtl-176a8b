// tb_dct_pipeline: self-checking test of the DCT post-processing pipeline.
//
// The testbench stands in for the FFT result RAM with a synchronous-read
// array of random complex U(k), loads random H(k) through the H load port,
// starts a run at a non-zero initial address and checks every V(k) against
// Hr Ur - Hi Ui computed in double precision, the index order, one result
// per clock, three clocks from each read to its result, and busy / done.
module tb_dct_pipeline;
  import fft_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n, start, busy, done, mem_chs_n, h_we, v_valid;
  logic [ADDR_W-1:0] iaddr, mem_addr, h_addr, v_index;
  logic [ADDR_W:0]   n_pts;
  cplx_t             mem_rdata, h_wdata;
  fp32_t             v_data;

  int checks = 0;
  int failures = 0;

  dct_pipeline dut (.*);

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
    return to_fp((real'($urandom % 20001) - 10000.0) / 1000.0);
  endfunction

  cplx_t umem [256];
  cplx_t hmem [256];

  // Synchronous-read stand-in for the FFT result RAM.
  always_ff @(posedge clk) if (!mem_chs_n) mem_rdata <= umem[mem_addr];

  int read_time [256];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!mem_chs_n) read_time[mem_addr - iaddr] = cyc;
  end

  task automatic run(input int n, input int base);
    int got, last_t;
    for (int k = 0; k < n; k++) begin
      umem[(base + k) % 256] = '{re: rnd(), im: rnd()};
      hmem[k] = '{re: rnd(), im: rnd()};
      @(negedge clk);
      h_we = 1'b1;
      h_addr = ADDR_W'(k);
      h_wdata = hmem[k];
    end
    @(negedge clk);
    h_we = 1'b0;
    iaddr = ADDR_W'(base);
    n_pts = (ADDR_W + 1)'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    got = 0;
    last_t = -1;
    while (busy) begin
      if (v_valid) begin
        real ur, ui, hr, hi, expv, err;
        ur = to_real(umem[(base + got) % 256].re);
        ui = to_real(umem[(base + got) % 256].im);
        hr = to_real(hmem[got].re);
        hi = to_real(hmem[got].im);
        expv = hr * ur - hi * ui;
        err = to_real(v_data) - expv;
        if (err < 0) err = -err;
        checks++;
        if (err > 1e-3 || int'(v_index) != got) begin
          failures++;
          $display("FAIL k=%0d idx=%0d got %f exp %f", got, v_index, to_real(v_data), expv);
        end
        checks++;
        if (cyc - read_time[got] != 3) begin
          failures++;
          $display("FAIL latency k=%0d: %0d clocks", got, cyc - read_time[got]);
        end
        if (last_t >= 0) begin
          checks++;
          if (cyc != last_t + 1) failures++;
        end
        last_t = cyc;
        got++;
      end
      @(negedge clk);
    end
    checks++;
    if (got != n) begin
      failures++;
      $display("FAIL: %0d results for N=%0d", got, n);
    end
  endtask

  logic seen_done = 1'b0;
  always @(posedge clk) if (done) seen_done <= 1'b1;

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    h_we = 1'b0;
    h_addr = '0;
    h_wdata = '0;
    iaddr = '0;
    n_pts = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(16, 16);
    run(4, 250);
    run(1, 0);
    checks++;
    if (!seen_done) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
