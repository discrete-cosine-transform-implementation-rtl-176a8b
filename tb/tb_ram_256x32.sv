// tb_ram_256x32: self-checking test of the two-port RAM.
//
// Fills the RAM through both ports with a pattern computed by the
// testbench, reads every word back through both ports (checking the one
// clock read latency), checks that a deselected port neither writes nor
// changes its output, and finishes with random traffic against a model array.
module tb_ram_256x32;
  logic        clk = 1'b0;
  logic        a_chs_n, a_rw, b_chs_n, b_rw;
  logic [7:0]  a_addr, b_addr;
  logic [31:0] a_din, b_din, a_dout, b_dout;
  logic [31:0] model [256];

  int checks = 0;
  int failures = 0;

  ram_256x32 dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pat(input int i);
    return 32'(i) * 32'h9E37_79B9 ^ 32'h1234_5678;
  endfunction

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    a_chs_n = 1'b1; b_chs_n = 1'b1; a_rw = 1'b1; b_rw = 1'b1;
    a_addr = '0; b_addr = '0; a_din = '0; b_din = '0;
    // Write even words on port A, odd words on port B.
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      a_chs_n = 1'b0; a_rw = 1'b0; a_addr = 8'(2 * i);     a_din = pat(2 * i);
      b_chs_n = 1'b0; b_rw = 1'b0; b_addr = 8'(2 * i + 1); b_din = pat(2 * i + 1);
      model[2 * i] = pat(2 * i);
      model[2 * i + 1] = pat(2 * i + 1);
    end
    // Read back: A ascending, B descending; data one clock after the address.
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      a_rw = 1'b1; a_addr = 8'(i);
      b_rw = 1'b1; b_addr = 8'(255 - i);
      @(posedge clk);
      #1;
      chk("readA", a_dout, pat(i));
      chk("readB", b_dout, pat(255 - i));
    end
    // Deselected port: no write, output held.
    @(negedge clk);
    a_chs_n = 1'b1; a_rw = 1'b0; a_addr = 8'd7; a_din = 32'hDEAD_BEEF;
    b_chs_n = 1'b1;
    @(posedge clk);
    #1;
    chk("holdA", a_dout, pat(255));
    @(negedge clk);
    a_chs_n = 1'b0; a_rw = 1'b1; a_addr = 8'd7;
    @(posedge clk);
    #1;
    chk("nowrite", a_dout, pat(7));
    // Random traffic against the model.
    for (int i = 0; i < 2000; i++) begin
      logic [7:0] ra;
      @(negedge clk);
      a_chs_n = 1'b0; b_chs_n = 1'b0;
      a_rw = 1'b0; a_addr = 8'($urandom); a_din = $urandom;
      ra = 8'($urandom);
      b_rw = 1'b1; b_addr = ra;
      model[a_addr] = a_din;
      @(posedge clk);
      #1;
      // The read sees the old word when the same address is written.
      if (ra != a_addr) chk("rand", b_dout, model[ra]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
