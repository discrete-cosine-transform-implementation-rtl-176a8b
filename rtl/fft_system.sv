// fft_system: the data-flow FFT system - pipelined butterfly, its
// controller, the address sequence generator, two data RAMs and a weight
// factor RAM, with the selectors between them.
//
// Data RAM 0 and data RAM 1 each hold one complex sample per address (a
// 256 x 32 RAM for the real parts and one for the imaginary parts).  During
// a stage one of them is read (A and B of a butterfly in the same clock, on
// ports A and B) and the other is written (C on port A, D on port B); the
// roles swap every stage.  The weight RAM (real and imaginary 256 x 32)
// supplies W^k on its port A, one word per butterfly.  In the DCT pass of
// the address sequence generator the B operand is forced to zero.
//
// External memory access (the universal controller's path to the RAMs):
// while ext_sel is high and the generator is idle, ext_chs_n / ext_rw /
// ext_bank / ext_addr / ext_wdata reach port A of data RAM 0 or 1 or port B
// of the weight RAM (bank 0, 1, 2); read data appear on ext_rdata one clock
// after the address.  This is the C1/C2-selected access of the original
// (OCH, OR/OW, CADD, BE) folded into one port.
//
// Control and status: che_n, log2_pts, isto, dct_pass, coef_base in,
// stage_cnt, fft_cmp, osto out (see addr_seq_gen).  A run of an FFT of
// 2^L points takes L stages of 2^(L-1) + RAM_RD_LAT + BFLY_LAT + a few clocks.
// Every RAM has 2^AW words: 256, as described, by default; a larger AW
// lets larger transforms fit (the address widths follow AW).
module fft_system
  import fft_pkg::*;
#(
  parameter int unsigned AW = ADDR_W   // address width: RAMs of 2^AW words
) (
  input  logic              clk,
  input  logic              rst_n,
  // universal controller: start and status
  input  logic              che_n,
  input  logic [3:0]        log2_pts,
  input  logic              isto,
  input  logic              dct_pass,
  input  logic [AW-1:0] coef_base,
  output logic [3:0]        stage_cnt,
  output logic              fft_cmp,
  output logic              osto,
  // universal controller: memory access
  input  logic              ext_sel,
  input  logic              ext_chs_n,
  input  logic              ext_rw,
  input  logic [1:0]        ext_bank,
  input  logic [AW-1:0] ext_addr,
  input  cplx_t             ext_wdata,
  output cplx_t             ext_rdata
);

  // Sequencer / controller wiring.
  logic go, in_r, out_a, in_e, out_e;
  logic ie, oe, enable, busy;
  logic rd_en, rd_bank, b_zero, coef_rd, wr_en, wr_bank;
  logic [AW-1:0] rd_addr_a, rd_addr_b, coef_addr, wr_addr_c, wr_addr_d;

  addr_seq_gen #(.AW(AW)) u_seq (
    .clk, .rst_n, .che_n, .log2_pts, .isto, .dct_pass, .coef_base,
    .stage_cnt, .fft_cmp, .osto,
    .go, .in_r, .out_a, .in_e, .out_e,
    .rd_en, .rd_bank, .rd_addr_a, .rd_addr_b, .b_zero, .coef_rd, .coef_addr,
    .wr_en, .wr_bank, .wr_addr_c, .wr_addr_d
  );

  bfly_controller u_ctl (
    .clk, .rst_n, .go, .in_e, .out_e, .in_r, .out_a, .ie, .oe, .enable, .busy
  );

  // Butterfly.
  cplx_t bf_a, bf_b, bf_w, bf_c, bf_d;

  fft_butterfly u_bfly (
    .clk, .rst_n, .enable, .ie, .oe, .a(bf_a), .b(bf_b), .w(bf_w), .c(bf_c), .d(bf_d)
  );

  // RAM port signals, per data bank (0, 1) and the weight RAM.
  logic              pa_chs_n [2], pa_rw [2], pb_chs_n [2], pb_rw [2];
  logic [AW-1:0] pa_addr [2], pb_addr [2];
  cplx_t             pa_din [2], pb_din [2], pa_dout [2], pb_dout [2];
  cplx_t             w_dout, wx_dout;

  // Selectors: the sequencer owns the RAMs unless the external port does.
  always_comb begin
    for (int k = 0; k < 2; k++) begin
      pa_chs_n[k] = 1'b1;
      pa_rw[k]    = 1'b1;
      pa_addr[k]  = '0;
      pa_din[k]   = '0;
      pb_chs_n[k] = 1'b1;
      pb_rw[k]    = 1'b1;
      pb_addr[k]  = '0;
      pb_din[k]   = '0;
      if (ext_sel) begin
        if (ext_bank == 2'(k)) begin
          pa_chs_n[k] = ext_chs_n;
          pa_rw[k]    = ext_rw;
          pa_addr[k]  = ext_addr;
          pa_din[k]   = ext_wdata;
        end
      end else if (rd_en && rd_bank == 1'(k)) begin
        pa_chs_n[k] = 1'b0;
        pa_addr[k]  = rd_addr_a;
        pb_chs_n[k] = b_zero;           // B is not read in the DCT pass
        pb_addr[k]  = rd_addr_b;
      end else if (wr_en && wr_bank == 1'(k)) begin
        pa_chs_n[k] = 1'b0;
        pa_rw[k]    = 1'b0;
        pa_addr[k]  = wr_addr_c;
        pa_din[k]   = bf_c;
        pb_chs_n[k] = 1'b0;
        pb_rw[k]    = 1'b0;
        pb_addr[k]  = wr_addr_d;
        pb_din[k]   = bf_d;
      end
    end
  end

  for (genvar k = 0; k < 2; k++) begin : g_bank
    ram_256x32 #(.DEPTH(1 << AW)) u_re (
      .clk,
      .a_chs_n(pa_chs_n[k]), .a_rw(pa_rw[k]), .a_addr(pa_addr[k]), .a_din(pa_din[k].re),
      .a_dout(pa_dout[k].re),
      .b_chs_n(pb_chs_n[k]), .b_rw(pb_rw[k]), .b_addr(pb_addr[k]), .b_din(pb_din[k].re),
      .b_dout(pb_dout[k].re)
    );
    ram_256x32 #(.DEPTH(1 << AW)) u_im (
      .clk,
      .a_chs_n(pa_chs_n[k]), .a_rw(pa_rw[k]), .a_addr(pa_addr[k]), .a_din(pa_din[k].im),
      .a_dout(pa_dout[k].im),
      .b_chs_n(pb_chs_n[k]), .b_rw(pb_rw[k]), .b_addr(pb_addr[k]), .b_din(pb_din[k].im),
      .b_dout(pb_dout[k].im)
    );
  end

  // Weight factor RAM: port A for the sequencer, port B for external access.
  logic wx_chs_n;
  assign wx_chs_n = !(ext_sel && ext_bank == 2'd2) || ext_chs_n;

  ram_256x32 #(.DEPTH(1 << AW)) u_w_re (
    .clk,
    .a_chs_n(!(coef_rd && !ext_sel)), .a_rw(1'b1), .a_addr(coef_addr), .a_din('0),
    .a_dout(w_dout.re),
    .b_chs_n(wx_chs_n), .b_rw(ext_rw), .b_addr(ext_addr), .b_din(ext_wdata.re),
    .b_dout(wx_dout.re)
  );
  ram_256x32 #(.DEPTH(1 << AW)) u_w_im (
    .clk,
    .a_chs_n(!(coef_rd && !ext_sel)), .a_rw(1'b1), .a_addr(coef_addr), .a_din('0),
    .a_dout(w_dout.im),
    .b_chs_n(wx_chs_n), .b_rw(ext_rw), .b_addr(ext_addr), .b_din(ext_wdata.im),
    .b_dout(wx_dout.im)
  );

  // Operand selection, aligned with the read data (one clock after the read).
  logic       rd_bank_q, b_zero_q;
  logic [1:0] ext_bank_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_bank_q  <= 1'b0;
      b_zero_q   <= 1'b0;
      ext_bank_q <= '0;
    end else begin
      rd_bank_q  <= rd_bank;
      b_zero_q   <= b_zero;
      ext_bank_q <= ext_bank;
    end
  end

  assign bf_a = pa_dout[rd_bank_q];
  assign bf_b = b_zero_q ? '0 : pb_dout[rd_bank_q];
  assign bf_w = w_dout;

  always_comb begin
    unique case (ext_bank_q)
      2'd0:    ext_rdata = pa_dout[0];
      2'd1:    ext_rdata = pa_dout[1];
      default: ext_rdata = wx_dout;
    endcase
  end

  // External access only while no FFT pass is running.
  a_ext_idle: assert property (@(posedge clk) disable iff (!rst_n) !(ext_sel && (rd_en || wr_en)))
    else $error("fft_system: external access during an FFT pass");

endmodule
