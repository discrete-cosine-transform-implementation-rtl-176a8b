// dct_pipeline: the separate DCT stage ("method one") that turns an FFT
// result into the discrete cosine transform.
//
// For a sequence u(n) of N samples, zero-padded to 2N points and
// transformed by the FFT into U(k),
//   V(k) = Re[ H(k) U(k) ] = Hr(k) Ur(k) - Hi(k) Ui(k),  k = 0 .. N-1,
// with the merged scale-and-rotation factor
//   H(k) = alpha(k) exp(-j pi k / 2N),  alpha(0) = sqrt(1/N),
//   alpha(k) = sqrt(2/N) otherwise.
// Three floating point units do the work: two multipliers (Ur Hr and Ui Hi)
// and one adder used as subtractor.  A local sequencer reads U(k) from the
// FFT system's data RAM through a memory access port (mem_chs_n, mem_addr,
// read data on mem_rdata one clock later), starting at the initial address
// iaddr, and H(k) from its own H RAM (a pair of 2^AW x 32 RAMs, 256 words
// by default, loaded through h_we / h_addr / h_wdata before a run).
//
// Timing.  A one-clock `start` pulse (with iaddr and n_pts) begins a run;
// one k is read per clock, and V(k) leaves on v_data with v_valid and
// v_index three clocks after its read (RAM read, multiply, subtract).  `busy`
// is high from start until the last V(k) has left; `done` pulses with it.
// The three units and the sequencer follow the described structure; the
// output stream form is this design's choice.
module dct_pipeline
  import fft_pkg::*;
#(
  parameter int unsigned AW = ADDR_W   // address width: RAMs of 2^AW words
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start,
  input  logic [AW-1:0] iaddr,
  input  logic [AW:0]   n_pts,     // N, 1 .. 2^AW
  output logic              busy,
  output logic              done,
  // read access to the FFT result RAM
  output logic              mem_chs_n,
  output logic [AW-1:0] mem_addr,
  input  cplx_t             mem_rdata,
  // H(k) load port
  input  logic              h_we,
  input  logic [AW-1:0] h_addr,
  input  cplx_t             h_wdata,
  // result stream
  output logic              v_valid,
  output logic [AW-1:0] v_index,
  output fp32_t             v_data
);

  localparam int unsigned PIPE = 3;   // read, multiply, subtract

  logic [AW:0]   k_cnt;
  logic              reading;
  logic [PIPE-1:0]   vld;             // valid of the stages
  logic [AW-1:0] idx [PIPE];
  cplx_t             h_dout;
  fp32_t             p_rr, p_ii;

  assign reading   = busy && (k_cnt < n_pts);
  assign mem_chs_n = !reading;
  assign mem_addr  = iaddr + k_cnt[AW-1:0];

  // H RAM: port A read by the sequencer, port B written by the loader.
  ram_256x32 #(.DEPTH(1 << AW)) u_h_re (
    .clk,
    .a_chs_n(!reading), .a_rw(1'b1), .a_addr(k_cnt[AW-1:0]), .a_din('0),
    .a_dout(h_dout.re),
    .b_chs_n(!h_we), .b_rw(1'b0), .b_addr(h_addr), .b_din(h_wdata.re), .b_dout()
  );
  ram_256x32 #(.DEPTH(1 << AW)) u_h_im (
    .clk,
    .a_chs_n(!reading), .a_rw(1'b1), .a_addr(k_cnt[AW-1:0]), .a_din('0),
    .a_dout(h_dout.im),
    .b_chs_n(!h_we), .b_rw(1'b0), .b_addr(h_addr), .b_din(h_wdata.im), .b_dout()
  );

  // Two multipliers and one subtractor.
  fpu_a29325 u_mul_r (.clk, .rst_n, .en(1'b1), .op(FP_MUL), .r(mem_rdata.re), .s(h_dout.re),
                      .f(p_rr), .flags());
  fpu_a29325 u_mul_i (.clk, .rst_n, .en(1'b1), .op(FP_MUL), .r(mem_rdata.im), .s(h_dout.im),
                      .f(p_ii), .flags());
  fpu_a29325 u_sub   (.clk, .rst_n, .en(1'b1), .op(FP_SUB), .r(p_rr), .s(p_ii),
                      .f(v_data), .flags());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      k_cnt <= '0;
      vld   <= '0;
      for (int i = 0; i < PIPE; i++) idx[i] <= '0;
    end else begin
      done <= 1'b0;
      vld  <= {vld[PIPE-2:0], reading};
      idx[0] <= k_cnt[AW-1:0];
      for (int i = 1; i < PIPE; i++) idx[i] <= idx[i-1];
      if (start && !busy) begin
        busy  <= 1'b1;
        k_cnt <= '0;
      end else if (busy) begin
        if (reading) k_cnt <= k_cnt + 1'b1;
        if (!reading && vld == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign v_valid = vld[PIPE-1];
  assign v_index = idx[PIPE-1];

endmodule
