// fft_butterfly: fully pipelined radix-2 decimation-in-frequency butterfly
// ("structure 1"), built from ten floating point units.
//
//   C = A + B
//   D = (A - B) * W
//
// on complex IEEE single precision data.  The ten units sit in three rows,
// one unit per real operation, so a new butterfly can enter every clock:
//   row 1 (4 units): Cr = Ar + Br, Ci = Ai + Bi, R1r = Ar - Br, R1i = Ai - Bi
//   row 2 (4 units): R2r = R1r*Wr, R2i = R1i*Wr, R3r = R1i*Wi, R3i = R1r*Wi
//   row 3 (2 units): Dr = R2r - R3r, Di = R2i + R3i
// C and W travel alongside through delay registers.
//
// Timing.  `ie` loads A, B and W into the input register; `oe` loads C and
// D into the output register.  Five clock edges separate the input load from
// valid outputs (input register, three rows of units, output register), so a
// butterfly whose operands are presented with `ie` in cycle t is on c/d from
// cycle t+5 on, and one butterfly completes per clock (five time steps per
// sample, four overlapped with neighbours, all ten units busy).  `enable` is
// the chip enable of all units and delay registers; dropping it freezes the
// pipeline.  The row arrangement and the enables follow the described
// structure; the original alternated rising-edge units and falling-edge
// registers, while here every stage is one rising-edge register.
module fft_butterfly
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,  // processor (floating point unit) enable
  input  logic  ie,      // input register enable
  input  logic  oe,      // output register enable
  input  cplx_t a,
  input  cplx_t b,
  input  cplx_t w,       // weight factor W^k
  output cplx_t c,       // A + B
  output cplx_t d        // (A - B) W^k
);

  cplx_t buf_a, buf_b, buf_w;   // input register
  cplx_t w_d1;                  // W aligned with row 1 results
  cplx_t c_row1, c_d2, c_d3;    // C: row 1 result and its delays
  cplx_t r1, r2, r3, d_row3;

  // Input register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_a <= '0;
      buf_b <= '0;
      buf_w <= '0;
    end else if (ie) begin
      buf_a <= a;
      buf_b <= b;
      buf_w <= w;
    end
  end

  // Row 1: additions and subtractions.
  fpu_a29325 u_a1 (.clk, .rst_n, .en(enable), .op(FP_SUB), .r(buf_a.re), .s(buf_b.re),
                   .f(r1.re), .flags());
  fpu_a29325 u_a2 (.clk, .rst_n, .en(enable), .op(FP_SUB), .r(buf_a.im), .s(buf_b.im),
                   .f(r1.im), .flags());
  fpu_a29325 u_a3 (.clk, .rst_n, .en(enable), .op(FP_ADD), .r(buf_a.re), .s(buf_b.re),
                   .f(c_row1.re), .flags());
  fpu_a29325 u_a4 (.clk, .rst_n, .en(enable), .op(FP_ADD), .r(buf_a.im), .s(buf_b.im),
                   .f(c_row1.im), .flags());

  // Row 2: multiplications by the weight factor.
  fpu_a29325 u_b1 (.clk, .rst_n, .en(enable), .op(FP_MUL), .r(r1.re), .s(w_d1.re),
                   .f(r2.re), .flags());
  fpu_a29325 u_b2 (.clk, .rst_n, .en(enable), .op(FP_MUL), .r(r1.im), .s(w_d1.re),
                   .f(r2.im), .flags());
  fpu_a29325 u_b3 (.clk, .rst_n, .en(enable), .op(FP_MUL), .r(r1.im), .s(w_d1.im),
                   .f(r3.re), .flags());
  fpu_a29325 u_b4 (.clk, .rst_n, .en(enable), .op(FP_MUL), .r(r1.re), .s(w_d1.im),
                   .f(r3.im), .flags());

  // Row 3: combine the partial products.
  fpu_a29325 u_c1 (.clk, .rst_n, .en(enable), .op(FP_SUB), .r(r2.re), .s(r3.re),
                   .f(d_row3.re), .flags());
  fpu_a29325 u_c2 (.clk, .rst_n, .en(enable), .op(FP_ADD), .r(r2.im), .s(r3.im),
                   .f(d_row3.im), .flags());

  // Delay registers for W and C, and the output register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_d1 <= '0;
      c_d2 <= '0;
      c_d3 <= '0;
      c    <= '0;
      d    <= '0;
    end else begin
      if (enable) begin
        w_d1 <= buf_w;
        c_d2 <= c_row1;
        c_d3 <= c_d2;
      end
      if (oe) begin
        c <= c_d3;
        d <= d_row3;
      end
    end
  end

endmodule
