// fpu_a29325: simplified model of the AMD29325 single precision floating
// point processor, reduced to the four arithmetic functions the FFT needs.
//
// Function.  F = R + S, R - S, R * S or R / S on IEEE-754 single precision
// operands, selected by `op`.  Subtraction is addition with the sign of S
// inverted.  Addition aligns the smaller operand by right-shifting its
// mantissa by the exponent distance, adds or subtracts, and normalises.
// Multiplication adds the exponents less the bias 127 and multiplies the
// 24-bit mantissas (hidden bit restored); division subtracts them, adds the
// bias back and divides the mantissas.  As in the original model, results are
// truncated, not rounded.
//
// Number conventions (following the chip model this block describes): an
// operand whose exponent field is 0 is zero whatever its mantissa
// (denormals are flushed); a result that overflows becomes "infinity", every
// bit except the sign set; a result that underflows becomes all zeros; an
// operand with exponent 255 is a NaN, and NaN operands and division by zero
// return the NaN pattern 7FFFFFFF with the nan flag.  The flags report on the
// result held in F.
//
// Timing.  The chip computes on the rising clock edge while `en` (the chip
// enable) is high; F and the flags are registered, so a result appears one
// clock after its operands.  The input registers of the real chip are kept
// transparent (feed-through), and the output register is always enabled when
// the chip is.  The IEEE/DEC, rounding-mode, 16-bit I/O and conversion
// functions of the real part are not modelled.
module fpu_a29325
  import fft_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,      // chip enable: register a new result
  input  fp_op_e    op,      // operation select
  input  fp32_t     r,       // R operand bus
  input  fp32_t     s,       // S operand bus
  output fp32_t     f,       // F result bus (registered)
  output fp_flags_t flags    // status of the result in F (registered)
);

  // Result of the combinational arithmetic.
  typedef struct packed {
    fp32_t     val;
    fp_flags_t flg;
  } fp_res_t;

  // Pack sign, signed exponent and a 23-bit fraction, checking the range.
  function automatic fp_res_t pack(input logic sg, input logic signed [11:0] e,
                                   input logic [22:0] frac);
    fp_res_t res;
    res = '0;
    if (e >= 12'sd255) begin
      res.val = {sg, FP_INF_MAG};
      res.flg.overflow = 1'b1;
    end else if (e <= 12'sd0) begin
      res.val = FP_ZERO;
      res.flg.underflow = 1'b1;
      res.flg.zero = 1'b1;
    end else begin
      res.val = {sg, e[7:0], frac};
    end
    return res;
  endfunction

  function automatic fp_res_t fp_zero_res();
    fp_res_t res;
    res = '0;
    res.flg.zero = 1'b1;
    return res;
  endfunction

  function automatic fp_res_t fp_nan_res();
    fp_res_t res;
    res = '0;
    res.val = FP_NAN;
    res.flg.nan = 1'b1;
    return res;
  endfunction

  // Addition of a and b (the caller inverts the sign of b to subtract).
  function automatic fp_res_t fp_add(input fp32_t a, input fp32_t b);
    fp32_t hi_op, lo_op;
    logic [7:0]  edist;
    logic [26:0] mbig, msmall;   // 24-bit mantissa plus 3 guard bits
    logic [27:0] sum;
    logic [4:0]  lz;
    logic signed [11:0] e;
    fp_res_t res;
    if (a[30:23] == 8'd0 && b[30:23] == 8'd0) return fp_zero_res();
    if (a[30:23] == 8'd0) begin
      res = '0;
      res.val = b;
      return res;
    end
    if (b[30:23] == 8'd0) begin
      res = '0;
      res.val = a;
      return res;
    end
    // Order the operands by magnitude; the result takes the sign of the larger.
    if (a[30:0] >= b[30:0]) begin
      hi_op = a;
      lo_op = b;
    end else begin
      hi_op = b;
      lo_op = a;
    end
    edist   = hi_op[30:23] - lo_op[30:23];
    mbig   = {1'b1, hi_op[22:0], 3'b000};
    msmall = (edist > 8'd26) ? 27'd0 : ({1'b1, lo_op[22:0], 3'b000} >> edist);
    e      = 12'(hi_op[30:23]);
    if (hi_op[31] == lo_op[31]) begin
      sum = {1'b0, mbig} + {1'b0, msmall};
      if (sum[27]) begin
        sum = sum >> 1;
        e = e + 12'sd1;
      end
    end else begin
      sum = {1'b0, mbig} - {1'b0, msmall};
      if (sum == 28'd0) return fp_zero_res();
      lz = 5'd0;
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) break;
        lz = lz + 5'd1;
      end
      sum = sum << lz;
      e = e - 12'(lz);
    end
    return pack(hi_op[31], e, sum[25:3]);
  endfunction

  function automatic fp_res_t fp_mul(input fp32_t a, input fp32_t b);
    logic [47:0] p;
    logic signed [11:0] e;
    logic [22:0] frac;
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return fp_zero_res();
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = 12'(a[30:23]) + 12'(b[30:23]) - 12'sd127;
    if (p[47]) begin
      frac = p[46:24];
      e = e + 12'sd1;
    end else begin
      frac = p[45:23];
    end
    return pack(a[31] ^ b[31], e, frac);
  endfunction

  function automatic fp_res_t fp_div(input fp32_t a, input fp32_t b);
    logic [48:0] q;
    logic signed [11:0] e;
    logic [22:0] frac;
    if (b[30:23] == 8'd0) return fp_nan_res();
    if (a[30:23] == 8'd0) return fp_zero_res();
    // q = ma * 2^25 / mb lies in (2^24, 2^26).
    q = {1'b1, a[22:0], 25'd0} / 49'({1'b1, b[22:0]});
    e = 12'(a[30:23]) - 12'(b[30:23]) + 12'sd127;
    if (q[25]) begin
      frac = q[24:2];
    end else begin
      frac = q[23:1];
      e = e - 12'sd1;
    end
    return pack(a[31] ^ b[31], e, frac);
  endfunction

  fp_res_t res_d;

  always_comb begin
    if (r[30:23] == 8'hFF || s[30:23] == 8'hFF) begin
      res_d = fp_nan_res();
    end else begin
      unique case (op)
        FP_ADD:  res_d = fp_add(r, s);
        FP_SUB:  res_d = fp_add(r, {~s[31], s[30:0]});
        FP_MUL:  res_d = fp_mul(r, s);
        FP_DIV:  res_d = fp_div(r, s);
        default: res_d = fp_zero_res();
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f     <= FP_ZERO;
      flags <= '0;
    end else if (en) begin
      f     <= res_d.val;
      flags <= res_d.flg;
    end
  end

endmodule
