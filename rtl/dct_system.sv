// dct_system: floating point discrete cosine transform processor built
// around a data-flow FFT system.
//
// The universal controller takes the samples, the FFT weight factors and
// (for a DCT) the post-processing factors H(k) from a host stream, runs the
// FFT system (address sequence generator, butterfly controller, pipelined
// butterfly of ten floating point units, two data RAMs and a weight RAM)
// and streams the result back.  Three modes:
//   MODE_FFT       an FFT of 2^log2_pts complex points;
//   MODE_DCT_PIPE  a DCT of N = 2^(log2_pts-1) real points: a 2N-point FFT
//                  of the zero-padded input, then the separate three-unit
//                  DCT pipeline forms V(k) = Re[H(k) U(k)];
//   MODE_DCT_BFLY  the same DCT, with V(k) formed by one more pass of the
//                  butterfly itself (B = 0, W = H(k)).
// With the default 256-word RAMs (AW = 8) the FFT can have up to 64 points
// (its N/2 * log2(N) weight factors share one 256-word RAM) and the DCT up
// to 32 points (FFT weights plus the N factors H(k) in the weight RAM).
// AW enlarges every RAM to 2^AW words; AW = 13 holds a 1024-point FFT
// (5120 weight factors).  The widths of out_index and the internal
// addresses follow AW.
//
// Host interface and timing: see univ_controller.  A run begins with a
// one-clock `start`; the host then supplies samples, weights and H(k) on
// in_valid / in_data while in_ready is high; results arrive on out_valid /
// out_index / out_data; `done` pulses after the last.  stage_cnt shows the
// FFT stage being computed.
//
// The structure (one FFT system reused for the DCT, the two ways of
// finishing it) is the described one; the host stream and the single clock
// are this design's choices.
module dct_system
  import fft_pkg::*;
#(
  parameter int unsigned AW = ADDR_W   // address width: RAMs of 2^AW words
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  sys_mode_e         mode,
  input  logic [3:0]        log2_pts,
  output logic              busy,
  output logic              done,
  input  logic              in_valid,
  output logic              in_ready,
  input  cplx_t             in_data,
  output logic              out_valid,
  output logic [AW-1:0] out_index,
  output cplx_t             out_data,
  output logic [3:0]        stage_cnt
);

  // Controller <-> FFT system.
  logic              che_n, isto, dct_pass, fft_cmp, osto;
  logic [3:0]        len;
  logic [AW-1:0] coef_base;
  logic              ext_sel, ext_chs_n, ext_rw;
  logic [1:0]        ext_bank;
  logic [AW-1:0] ext_addr;
  cplx_t             ext_wdata, ext_rdata;

  // Controller <-> DCT pipeline.
  logic              dp_start, dp_done, dp_mem_chs_n, dp_v_valid, h_we;
  logic [AW-1:0] dp_mem_addr, dp_v_index, h_addr;
  logic [AW:0]   dp_n;
  fp32_t             dp_v_data;
  cplx_t             h_wdata;

  univ_controller #(.AW(AW)) u_uc (
    .clk, .rst_n,
    .start, .mode, .log2_pts, .busy, .done,
    .in_valid, .in_ready, .in_data, .out_valid, .out_index, .out_data,
    .che_n, .len, .isto, .dct_pass, .coef_base, .fft_cmp, .osto,
    .ext_sel, .ext_chs_n, .ext_rw, .ext_bank, .ext_addr, .ext_wdata, .ext_rdata,
    .dp_start, .dp_n, .dp_done, .dp_mem_chs_n, .dp_mem_addr,
    .dp_v_valid, .dp_v_index, .dp_v_data, .h_we, .h_addr, .h_wdata
  );

  fft_system #(.AW(AW)) u_fft (
    .clk, .rst_n,
    .che_n, .log2_pts(len), .isto, .dct_pass, .coef_base, .stage_cnt, .fft_cmp, .osto,
    .ext_sel, .ext_chs_n, .ext_rw, .ext_bank, .ext_addr, .ext_wdata, .ext_rdata
  );

  dct_pipeline #(.AW(AW)) u_dct (
    .clk, .rst_n,
    .start(dp_start), .iaddr('0), .n_pts(dp_n), .busy(), .done(dp_done),
    .mem_chs_n(dp_mem_chs_n), .mem_addr(dp_mem_addr), .mem_rdata(ext_rdata),
    .h_we, .h_addr, .h_wdata,
    .v_valid(dp_v_valid), .v_index(dp_v_index), .v_data(dp_v_data)
  );

endmodule
