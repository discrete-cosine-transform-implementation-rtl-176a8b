// tb_addr_seq_gen: self-checking test of the address sequence generator.
//
// The generator is paired with the butterfly controller, its partner in the
// FFT system.  For several FFT lengths and both input RAMs the testbench
// logs every read (A and B address, bank, weight address) and every write
// (C and D address, bank) and compares them with the non-in-place DIF
// schedule worked out here by nested loops over blocks and butterflies:
// stage s, block j, offset k < h = N >> s reads A = 2hj + k and B = A + h.
// It also checks the stage counter, the completion flag, OSTO, the weight
// address continuing from coef_base, the DCT pass (A = k, B forced to zero,
// one stage) and the number of clocks per stage.
module tb_addr_seq_gen;
  import fft_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n, che_n, isto, dct_pass;
  logic [3:0]        log2_pts, stage_cnt;
  logic [ADDR_W-1:0] coef_base;
  logic              fft_cmp, osto, go, in_r, out_a, in_e, out_e;
  logic              rd_en, rd_bank, b_zero, coef_rd, wr_en, wr_bank;
  logic [ADDR_W-1:0] rd_addr_a, rd_addr_b, coef_addr, wr_addr_c, wr_addr_d;
  logic              ie, oe, enable, busy;

  int checks = 0;
  int failures = 0;

  addr_seq_gen dut (.*);
  bfly_controller u_ctl (.clk, .rst_n, .go, .in_e, .out_e, .in_r, .out_a, .ie, .oe,
                         .enable, .busy);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Logs of the memory traffic of one run.
  int rd_a[$], rd_b[$], rd_bk[$], rd_w[$], rd_stage[$];
  int wr_c[$], wr_d[$], wr_bk[$];
  int cycles;

  always @(posedge clk) begin
    if (rd_en) begin
      rd_a.push_back(int'(rd_addr_a));
      rd_b.push_back(int'(rd_addr_b));
      rd_bk.push_back(int'(rd_bank));
      rd_w.push_back(int'(coef_addr));
      rd_stage.push_back(int'(stage_cnt));
      chk("coef_rd with rd_en", coef_rd);
      chk("b_zero", b_zero == dct_pass);
    end
    if (wr_en) begin
      wr_c.push_back(int'(wr_addr_c));
      wr_d.push_back(int'(wr_addr_d));
      wr_bk.push_back(int'(wr_bank));
    end
  end

  task automatic run(input int lp, input bit in_bank, input bit dct, input int cbase);
    int n, idx, w, nst, h, bank;
    n = 1 << (lp - 1);
    nst = dct ? 1 : lp;
    rd_a.delete(); rd_b.delete(); rd_bk.delete(); rd_w.delete(); rd_stage.delete();
    wr_c.delete(); wr_d.delete(); wr_bk.delete();
    @(negedge clk);
    log2_pts = 4'(lp);
    isto = in_bank;
    dct_pass = dct;
    coef_base = ADDR_W'(cbase);
    che_n = 1'b0;
    cycles = 0;
    while (!fft_cmp && cycles < 5000) begin
      @(negedge clk);
      cycles++;
    end
    chk("completed", fft_cmp);
    chk("stage count", int'(stage_cnt) == nst);
    chk("osto", osto == (in_bank ^ nst[0]));
    chk("read count", rd_a.size() == n * nst);
    chk("write count", wr_c.size() == n * nst);
    // Expected schedule.
    idx = 0;
    bank = in_bank;
    for (int s = 0; s < nst; s++) begin
      h = n >> s;
      for (int j = 0; j < n / h; j++) begin
        for (int k = 0; k < h; k++) begin
          int ea;
          ea = dct ? idx - s * n : 2 * h * j + k;
          if (idx < rd_a.size()) begin
            chk("A addr", rd_a[idx] == ea);
            chk("B addr", dct || rd_b[idx] == ea + h);
            chk("read bank", rd_bk[idx] == bank);
            chk("weight addr", rd_w[idx] == (cbase + idx) % 256);
            chk("stage", rd_stage[idx] == s);
          end
          idx++;
        end
      end
      for (int i = 0; i < n; i++) begin
        w = s * n + i;
        if (w < wr_c.size()) begin
          chk("C addr", wr_c[w] == i);
          chk("D addr", wr_d[w] == i + n);
          chk("write bank", wr_bk[w] == 1 - bank);
        end
      end
      bank = 1 - bank;
    end
    // Clocks: per stage N butterflies plus the pipeline fill and a few
    // control states.
    chk("cycle budget", cycles <= nst * (n + int'(RAM_RD_LAT + BFLY_LAT) + 6) + 4);
    $display("log2_pts=%0d dct=%0d: %0d clocks", lp, dct, cycles);
    // Release: CHE high clears the completion flag.
    @(negedge clk);
    che_n = 1'b1;
    @(negedge clk);
    @(negedge clk);
    chk("fft_cmp cleared", !fft_cmp);
  endtask

  initial begin
    rst_n = 1'b0;
    che_n = 1'b1;
    log2_pts = 4'd3;
    isto = 1'b0;
    dct_pass = 1'b0;
    coef_base = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(3, 1'b0, 1'b0, 0);    // 8-point FFT from RAM 0
    run(3, 1'b1, 1'b0, 0);    // 8-point FFT from RAM 1
    run(5, 1'b0, 1'b0, 0);    // 32-point FFT
    run(1, 1'b1, 1'b0, 0);    // 2-point FFT
    run(6, 1'b1, 1'b0, 10);   // 64-point FFT, weights from address 10
    run(5, 1'b1, 1'b1, 80);   // DCT pass after a 32-point FFT
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
