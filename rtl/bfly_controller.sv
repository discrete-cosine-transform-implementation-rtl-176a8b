// bfly_controller: controller of the pipelined butterfly.
//
// It opens and closes the butterfly's ports for one FFT stage and tells the
// address sequence generator when to read operands and when results are on
// the output bus.  Handshake with the address sequence generator:
//   go     (in)  one-cycle pulse starting a stage (stands for the falling
//                IN_E / OUT_E that trigger the original controller)
//   in_r   (out) input request: operands are wanted, one butterfly per clock
//   in_e   (in)  input end: every operand of the stage has been fetched
//   out_a  (out) output available: C and D on the butterfly output are valid
//   out_e  (in)  output end: every result of the stage has been stored
// To the butterfly: ie (input register enable), oe (output register enable)
// and enable (processor enable).
//
// Operation.  `go` sets in_r and enable and clears the counter CNT; CNT then
// counts clocks, the first read being in the cycle with CNT = 0.  IE follows
// each granted read one clock later, when the RAM data arrive
// (RAM_RD_LAT).  OE is set when CNT reaches RAM_RD_LAT + BFLY_LAT - 1 and
// OUT_A one clock later, when the first result is on the output bus; both
// hold while results stream out.  in_e clears in_r; out_e clears OE, OUT_A
// and ENABLE and ends the stage.  The signal set and the counter follow the
// original controller; the exact counts come from this design's pipeline.
module bfly_controller
  import fft_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  input  logic in_e,
  input  logic out_e,
  output logic in_r,
  output logic out_a,
  output logic ie,
  output logic oe,
  output logic enable,
  output logic busy     // a stage is in progress
);

  localparam int unsigned OE_CNT   = RAM_RD_LAT + BFLY_LAT - 1;
  localparam int unsigned OUTA_CNT = RAM_RD_LAT + BFLY_LAT;

  logic [3:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      in_r   <= 1'b0;
      out_a  <= 1'b0;
      ie     <= 1'b0;
      oe     <= 1'b0;
      enable <= 1'b0;
      busy   <= 1'b0;
    end else if (go) begin
      cnt    <= '0;
      in_r   <= 1'b1;
      out_a  <= 1'b0;
      ie     <= 1'b0;
      oe     <= 1'b0;
      enable <= 1'b1;
      busy   <= 1'b1;
    end else if (busy) begin
      if (cnt != 4'hF) cnt <= cnt + 4'd1;
      // A read is granted in every cycle with in_r high and in_e low.
      ie <= in_r && !in_e;
      if (in_e) in_r <= 1'b0;
      if (32'(cnt) + 1 == OE_CNT) oe <= 1'b1;
      if (32'(cnt) + 1 == OUTA_CNT) out_a <= 1'b1;
      if (out_e && 32'(cnt) >= OUTA_CNT) begin
        out_a  <= 1'b0;
        oe     <= 1'b0;
        enable <= 1'b0;
        busy   <= 1'b0;
      end
    end
  end

  // A new stage must not start while one is in progress.
  a_go_idle: assert property (@(posedge clk) disable iff (!rst_n) !(go && busy))
    else $error("bfly_controller: go while busy");

endmodule
