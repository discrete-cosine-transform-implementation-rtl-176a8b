// addr_seq_gen: address sequence generator of the FFT system.
//
// It runs the stages of a radix-2 decimation-in-frequency FFT whose input
// and output are both in natural order (the non-in-place form).  Data of a
// stage are read from one data RAM and written to the other; the RAMs swap
// roles every stage (ping-pong pointer PTR).  For N = 2^(log2_pts-1)
// butterflies per stage and stage s = 0 .. log2_pts-1, with span
// h = N >> s, butterfly i reads
//   A at (i mod h) + 2h * (i div h),   B at A + h
// and writes C to i and D to i + N.  Weight factors are read from the
// coefficient RAM at consecutive addresses, one per butterfly, starting at
// coef_base: the coefficient RAM holds the weight of every butterfly of every
// stage in execution order (W_{2h}^(i mod h) for butterfly i of stage s).
//
// In DCT mode (dct_pass = 1) the generator makes a single extra pass through
// the butterfly: butterfly k reads A = U(k) at address k, forces B to zero
// (b_zero, which is dct_pass itself, handed on to the data path) and reads
// H(k) as the weight, so D = U(k) H(k) lands at k + N.
//
// Interface to the universal controller: che_n (chip enable, active low:
// high holds the generator idle, falling starts a run), log2_pts (input data
// length), isto (RAM holding the input), coef_base; status stage_cnt,
// fft_cmp (set when the run is complete, held until che_n rises) and osto
// (RAM holding the result).  Interface to the butterfly controller: go,
// in_r, in_e, out_a, out_e (see bfly_controller).  Memory side: rd_en with
// rd_bank / rd_addr_a / rd_addr_b, wr_en with wr_bank / wr_addr_c /
// wr_addr_d, coef_rd with coef_addr; addresses are valid in the cycle of
// the enable, read data come back one clock later.
//
// States follow the described flow: 0 load the length and clear the stage
// counter, 1 clear the read and write counters and start the controller,
// 2 read and write until IN_E and OUT_E, 7 count the stage and swap the
// RAMs, 8 finish or begin the next stage.  Encoding of the length as
// log2 of the point count, and the che_n / fft_cmp polarities, are this
// design's choices.  AW is the RAM address width (8 for the described
// 256-word RAMs); all addresses and counters follow it.
module addr_seq_gen
  import fft_pkg::*;
#(
  parameter int unsigned AW = ADDR_W   // address width: RAMs of 2^AW words
) (
  input  logic              clk,
  input  logic              rst_n,
  // universal controller
  input  logic              che_n,
  input  logic [3:0]        log2_pts,   // FFT length 2^log2_pts, 1..8
  input  logic              isto,
  input  logic              dct_pass,
  input  logic [AW-1:0] coef_base,
  output logic [3:0]        stage_cnt,
  output logic              fft_cmp,
  output logic              osto,
  // butterfly controller
  output logic              go,
  input  logic              in_r,
  input  logic              out_a,
  output logic              in_e,
  output logic              out_e,
  // memory access
  output logic              rd_en,
  output logic              rd_bank,
  output logic [AW-1:0] rd_addr_a,
  output logic [AW-1:0] rd_addr_b,
  output logic              b_zero,
  output logic              coef_rd,
  output logic [AW-1:0] coef_addr,
  output logic              wr_en,
  output logic              wr_bank,
  output logic [AW-1:0] wr_addr_c,
  output logic [AW-1:0] wr_addr_d
);

  typedef enum logic [2:0] {
    S_IDLE  = 3'd0,
    S_INIT  = 3'd1,   // state 0
    S_STAGE = 3'd2,   // state 1
    S_RUN   = 3'd3,   // states 2..4
    S_NEXT  = 3'd4,   // state 7
    S_FINAL = 3'd5,   // state 8
    S_DONE  = 3'd6
  } state_e;

  state_e             state;
  logic [AW:0]    n_bfly;     // butterflies per stage
  logic [3:0]         n_stages;
  logic [AW:0]    r_cnt, w_cnt;
  logic [AW-1:0]  span;       // h = N >> stage
  logic               ptr;
  logic [AW-1:0]  coe_buf;
  logic [AW-1:0]  i_rd, i_wr;

  assign in_e  = (state == S_RUN) && (r_cnt == n_bfly);
  assign out_e = (state == S_RUN) && (w_cnt == n_bfly);

  assign rd_en   = (state == S_RUN) && in_r && !in_e;
  assign coef_rd = rd_en;
  assign wr_en   = (state == S_RUN) && out_a && !out_e;
  assign rd_bank = ptr;
  assign wr_bank = ~ptr;
  assign b_zero  = dct_pass;

  assign i_rd = r_cnt[AW-1:0];
  assign i_wr = w_cnt[AW-1:0];

  always_comb begin
    if (dct_pass) begin
      rd_addr_a = i_rd;
    end else begin
      // (i mod h) + 2h (i div h): keep the low bits, shift the rest up one.
      rd_addr_a = ((i_rd & ~(span - 1'b1)) << 1) | (i_rd & (span - 1'b1));
    end
    rd_addr_b = rd_addr_a + span;
    coef_addr = coe_buf;
    wr_addr_c = i_wr;
    wr_addr_d = i_wr + n_bfly[AW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      n_bfly    <= '0;
      n_stages  <= '0;
      r_cnt     <= '0;
      w_cnt     <= '0;
      span      <= '0;
      ptr       <= 1'b0;
      coe_buf   <= '0;
      stage_cnt <= '0;
      fft_cmp   <= 1'b0;
      osto      <= 1'b0;
      go        <= 1'b0;
    end else if (che_n) begin
      state   <= S_IDLE;
      fft_cmp <= 1'b0;
      go      <= 1'b0;
    end else begin
      go <= 1'b0;
      unique case (state)
        S_IDLE: state <= S_INIT;
        S_INIT: begin
          n_bfly    <= (AW + 1)'(1) << (log2_pts - 4'd1);
          n_stages  <= dct_pass ? 4'd1 : log2_pts;
          stage_cnt <= '0;
          coe_buf   <= coef_base;
          ptr       <= isto;
          fft_cmp   <= 1'b0;
          state     <= S_STAGE;
        end
        S_STAGE: begin
          r_cnt <= '0;
          w_cnt <= '0;
          span  <= AW'(n_bfly >> stage_cnt);
          go    <= 1'b1;
          state <= S_RUN;
        end
        S_RUN: begin
          if (rd_en) begin
            r_cnt   <= r_cnt + 1'b1;
            coe_buf <= coe_buf + 1'b1;
          end
          if (wr_en) w_cnt <= w_cnt + 1'b1;
          if (in_e && out_e) state <= S_NEXT;
        end
        S_NEXT: begin
          stage_cnt <= stage_cnt + 4'd1;
          ptr       <= ~ptr;
          state     <= S_FINAL;
        end
        S_FINAL: begin
          if (stage_cnt == n_stages) begin
            fft_cmp <= 1'b1;
            osto    <= ptr;
            state   <= S_DONE;
          end else begin
            state <= S_STAGE;
          end
        end
        S_DONE: state <= S_DONE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
