// ram_256x32: static RAM of 256 words by 32 bits with separate input and
// output data buses, the storage element of the FFT system.
//
// Each word holds one IEEE single precision number (the real or the
// imaginary part of a sample, or of a weight factor).  The RAM has two
// independent access ports, A and B.  They stand for the two accesses per
// clock period of the revised FFT system, where the 64-bit memory path is
// used on both clock phases to move A and B (or C and D) of one butterfly in
// one period; here both accesses happen on the rising edge through two ports.
//
// Per port: chs_n selects the chip (active low), rw chooses read (1) or
// write (0), addr is the word address.  A write stores din at the rising
// edge.  A read returns mem[addr] on dout one clock later (registered
// output, RAM_RD_LAT = 1); dout holds its value while the port is not
// reading.  Writing the same word on both ports in one cycle is not allowed
// (an assertion flags it); port B then wins.  The memory starts at zero;
// an output is undefined until its port's first read.
// The 256 x 32 size follows the RAM model of the original system; the
// timing-check generics of that model (setup, access and pulse widths) have
// no counterpart in this synchronous design.
module ram_256x32 #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  // port A
  input  logic             a_chs_n,
  input  logic             a_rw,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_din,
  output logic [WIDTH-1:0] a_dout,
  // port B
  input  logic             b_chs_n,
  input  logic             b_rw,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_din,
  output logic [WIDTH-1:0] b_dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (!a_chs_n && !a_rw) mem[a_addr] <= a_din;
    if (!b_chs_n && !b_rw) mem[b_addr] <= b_din;
    if (!a_chs_n && a_rw) a_dout <= mem[a_addr];
    if (!b_chs_n && b_rw) b_dout <= mem[b_addr];
  end

  // Both ports writing one word in the same cycle is a usage error.
  always_ff @(posedge clk) begin
    assert (!(!a_chs_n && !a_rw && !b_chs_n && !b_rw && a_addr == b_addr))
      else $error("ram_256x32: both ports write address %0d", a_addr);
  end

endmodule
