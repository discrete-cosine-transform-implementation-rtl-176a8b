// tb_bfly_controller: self-checking test of the butterfly controller.
//
// The testbench plays the address sequence generator: after `go` it grants
// one read per clock while in_r is high until NB reads are done (in_e), and
// stores one result per clock while out_a is high until NB writes are done
// (out_e).  It checks that IE follows each read exactly one clock later,
// that OE rises RAM_RD_LAT + BFLY_LAT - 1 clocks and OUT_A
// RAM_RD_LAT + BFLY_LAT clocks after the first read, that exactly NB
// results are stored in consecutive clocks, and that out_e closes the
// ports and ENABLE.  Several stage lengths are run back to back.
module tb_bfly_controller;
  import fft_pkg::*;

  logic clk = 1'b0;
  logic rst_n, go, in_e, out_e;
  logic in_r, out_a, ie, oe, enable, busy;

  int checks = 0;
  int failures = 0;

  bfly_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int r_cnt, w_cnt, nb;
  assign in_e  = busy && (r_cnt == nb);
  assign out_e = busy && (w_cnt == nb);

  task automatic run_stage(input int n);
    int cyc, first_rd, first_oe, first_oa, last_wr;
    bit rd_prev, rd_now;
    nb = n;
    @(negedge clk);
    r_cnt = 0;
    w_cnt = 0;
    go = 1'b1;
    @(negedge clk);
    go = 1'b0;
    cyc = 0;
    first_rd = -1; first_oe = -1; first_oa = -1; last_wr = -1;
    rd_prev = 1'b0;
    while (busy && cyc < 100) begin
      rd_now = in_r && !in_e;
      // IE mirrors the previous cycle's read grant.
      chk("ie follows read", ie == rd_prev);
      chk("enable while busy", enable);
      if (rd_now && first_rd < 0) first_rd = cyc;
      if (oe && first_oe < 0) first_oe = cyc;
      if (out_a && first_oa < 0) first_oa = cyc;
      if (out_a && !out_e) begin
        if (last_wr >= 0) chk("writes consecutive", last_wr == cyc - 1);
        last_wr = cyc;
      end
      @(posedge clk);
      if (rd_now) r_cnt <= r_cnt + 1;
      if (out_a && !out_e) w_cnt <= w_cnt + 1;
      rd_prev = rd_now;
      @(negedge clk);
      cyc++;
    end
    chk("stage ended", !busy);
    chk("reads", r_cnt == n);
    chk("writes", w_cnt == n);
    chk("first read at once", first_rd == 0);
    chk("OE timing", first_oe == first_rd + int'(RAM_RD_LAT + BFLY_LAT) - 1);
    chk("OUT_A timing", first_oa == first_rd + int'(RAM_RD_LAT + BFLY_LAT));
    chk("closed", !oe && !out_a && !enable && !in_r);
  endtask

  initial begin
    rst_n = 1'b0;
    go = 1'b0;
    nb = 0;
    r_cnt = 0;
    w_cnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_stage(4);
    run_stage(1);
    run_stage(16);
    run_stage(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
