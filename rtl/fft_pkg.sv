// fft_pkg: types and constants shared by the FFT / DCT data-flow system.
//
// All arithmetic is IEEE-754 single precision (1 sign, 8 exponent, 23
// mantissa bits), the only format the design uses.  A complex number is a
// pair of such words.  The operation codes select the four arithmetic
// functions of the simplified AMD29325 floating point unit.  The pipeline
// latencies below tie the butterfly, its controller and the address
// sequence generator together; they are this design's own numbers (the
// five time steps of a butterfly: read, add/subtract, multiply,
// add/subtract, write).
package fft_pkg;

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    fp32_t re;
    fp32_t im;
  } cplx_t;

  // Arithmetic operation select of the floating point unit.
  typedef enum logic [1:0] {
    FP_ADD = 2'd0,
    FP_SUB = 2'd1,
    FP_MUL = 2'd2,
    FP_DIV = 2'd3
  } fp_op_e;

  // Status flags of the floating point unit.
  typedef struct packed {
    logic nan;
    logic overflow;
    logic underflow;
    logic zero;
  } fp_flags_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  // Infinity / overflow pattern: every bit except the sign set.
  localparam logic [30:0] FP_INF_MAG = 31'h7FFF_FFFF;
  // Not-a-number pattern returned for NaN operands and division by zero.
  localparam fp32_t FP_NAN = 32'h7FFF_FFFF;

  // RAM geometry (256 words by 32 bits).
  localparam int unsigned ADDR_W = 8;

  // Clock cycles from a RAM read address to the data at the butterfly input.
  localparam int unsigned RAM_RD_LAT = 1;
  // Clock cycles from the butterfly input register load to valid C/D outputs
  // (input register, add/sub row, multiply row, add/sub row, output register).
  localparam int unsigned BFLY_LAT = 5;

  // Data-path mode of one pass of the address sequence generator.
  typedef enum logic [1:0] {
    MODE_FFT = 2'd0,   // FFT only
    MODE_DCT_PIPE = 2'd1,  // DCT by the separate pipeline (method one)
    MODE_DCT_BFLY = 2'd2   // DCT by one more butterfly pass (method two)
  } sys_mode_e;

endpackage
