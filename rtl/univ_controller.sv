// univ_controller: universal controller of the FFT / DCT system.
//
// It sequences one complete transform: it stores the input data and the
// weight factors in the FFT system's RAMs, starts the address sequence
// generator, waits for FFT_CMP and streams the result out of the RAM named
// by OSTO.  For the DCT it adds one of the two described completions:
//   MODE_DCT_BFLY ("method two"): after the FFT a second run of the
//     generator passes every U(k) once more through the butterfly with B = 0
//     and W = H(k); the real part of D is V(k).
//   MODE_DCT_PIPE ("method one"): the separate dct_pipeline reads U(k)
//     through the same memory port and computes V(k) with its own units.
//
// Host interface.  `start` (one clock, with mode and log2_pts) begins a run.
// The controller then takes words from the input stream (in_valid / in_ready
// handshake, a word moves when both are high), in this order:
//   1. the samples: 2^log2_pts complex samples for an FFT; for a DCT the
//      N = 2^(log2_pts-1) real samples (imaginary part zero), which the
//      controller pads with N zeros to the 2N-point FFT input;
//   2. the weight factor of every butterfly of every stage, in execution
//      order: N * log2_pts words;
//   3. for a DCT only, the N factors H(k) = alpha(k) exp(-j pi k / 2N).
// Results leave on out_valid / out_index / out_data, one per clock with no
// back-pressure: the 2^log2_pts FFT bins, or the N DCT coefficients V(k) in
// out_data.re.  `done` pulses after the last result; `busy` is high
// throughout.
//
// The load / start / wait / unload flow, LEN, ISTO, CHE, OSTO, FFT_CMP and
// the extra butterfly pass follow the described controller; the stream
// interface, the zero padding and the word order are this design's choices.
// h_wdata is the input word itself, routed to the DCT pipeline's H RAM.
// AW is the RAM address width (2^AW words per RAM, 256 by default); the
// load addresses, counters and out_index follow it.
module univ_controller
  import fft_pkg::*;
#(
  parameter int unsigned AW = ADDR_W   // address width: RAMs of 2^AW words
) (
  input  logic              clk,
  input  logic              rst_n,
  // host
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
  // FFT system: start and status
  output logic              che_n,
  output logic [3:0]        len,
  output logic              isto,
  output logic              dct_pass,
  output logic [AW-1:0] coef_base,
  input  logic              fft_cmp,
  input  logic              osto,
  // FFT system: memory access
  output logic              ext_sel,
  output logic              ext_chs_n,
  output logic              ext_rw,
  output logic [1:0]        ext_bank,
  output logic [AW-1:0] ext_addr,
  output cplx_t             ext_wdata,
  input  cplx_t             ext_rdata,
  // DCT pipeline
  output logic              dp_start,
  output logic [AW:0]   dp_n,
  input  logic              dp_done,
  input  logic              dp_mem_chs_n,
  input  logic [AW-1:0] dp_mem_addr,
  input  logic              dp_v_valid,
  input  logic [AW-1:0] dp_v_index,
  input  fp32_t             dp_v_data,
  output logic              h_we,
  output logic [AW-1:0] h_addr,
  output cplx_t             h_wdata
);

  typedef enum logic [3:0] {
    U_IDLE    = 4'd0,
    U_LOAD_X  = 4'd1,
    U_LOAD_W  = 4'd2,
    U_LOAD_H  = 4'd3,
    U_FFT     = 4'd4,
    U_RELEASE = 4'd5,
    U_DCT     = 4'd6,
    U_UNLOAD  = 4'd7,
    U_DCTPIPE = 4'd8,
    U_DRAIN   = 4'd9
  } ustate_e;

  ustate_e           state;
  sys_mode_e         mode_q;
  logic [3:0]        lp_q;
  logic [AW:0]   n_pts;     // FFT points
  logic [AW:0]   n_half;    // butterflies per stage = DCT length
  logic [AW:0]   n_w;       // weight words
  logic [AW:0]   cnt;
  logic              res_bank;
  logic              rd_q;      // a result read was issued last clock
  logic [AW-1:0] rd_idx_q;
  logic              pad;       // writing a padding zero (no input consumed)
  logic              take;      // an input word moves this clock
  logic              is_dct;

  assign is_dct   = (mode_q != MODE_FFT);
  assign pad      = (state == U_LOAD_X) && is_dct && (cnt >= n_half);
  assign in_ready = ((state == U_LOAD_X) && !pad) || (state == U_LOAD_W) ||
                    (state == U_LOAD_H);
  assign take     = in_ready && in_valid;
  assign busy     = (state != U_IDLE);

  assign len       = lp_q;
  assign isto      = (state == U_DCT) ? res_bank : 1'b0;
  assign dct_pass  = (state == U_DCT);
  assign coef_base = (state == U_DCT) ? n_w[AW-1:0] : '0;

  assign dp_n     = n_half;

  // Memory port: loads, result reads, or the DCT pipeline's reads.
  always_comb begin
    ext_sel   = 1'b1;
    ext_chs_n = 1'b1;
    ext_rw    = 1'b1;
    ext_bank  = 2'd0;
    ext_addr  = cnt[AW-1:0];
    ext_wdata = in_data;
    h_we      = 1'b0;
    h_addr    = cnt[AW-1:0];
    h_wdata   = in_data;
    unique case (state)
      U_LOAD_X: begin
        ext_chs_n = !(take || pad);
        ext_rw    = 1'b0;
        ext_wdata = pad ? '0 : (is_dct ? '{re: in_data.re, im: FP_ZERO} : in_data);
      end
      U_LOAD_W: begin
        ext_chs_n = !take;
        ext_rw    = 1'b0;
        ext_bank  = 2'd2;
      end
      U_LOAD_H: begin
        if (mode_q == MODE_DCT_BFLY) begin
          ext_chs_n = !take;
          ext_rw    = 1'b0;
          ext_bank  = 2'd2;
          ext_addr  = n_w[AW-1:0] + cnt[AW-1:0];
        end else begin
          h_we = take;
        end
      end
      U_FFT, U_RELEASE, U_DCT: ext_sel = 1'b0;
      U_UNLOAD: begin
        ext_chs_n = 1'b0;
        ext_bank  = {1'b0, res_bank};
        ext_addr  = (mode_q == MODE_DCT_BFLY) ? n_half[AW-1:0] + cnt[AW-1:0]
                                               : cnt[AW-1:0];
      end
      U_DCTPIPE: begin
        ext_chs_n = dp_mem_chs_n;
        ext_bank  = {1'b0, res_bank};
        ext_addr  = dp_mem_addr;
      end
      default: ;
    endcase
  end

  // Result stream.
  always_comb begin
    out_valid = 1'b0;
    out_index = rd_idx_q;
    out_data  = ext_rdata;
    if (state == U_DCTPIPE) begin
      out_valid = dp_v_valid;
      out_index = dp_v_index;
      out_data  = '{re: dp_v_data, im: FP_ZERO};
    end else if (rd_q) begin
      out_valid = 1'b1;
      if (mode_q == MODE_DCT_BFLY) out_data = '{re: ext_rdata.re, im: FP_ZERO};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= U_IDLE;
      mode_q   <= MODE_FFT;
      lp_q     <= 4'd1;
      n_pts    <= '0;
      n_half   <= '0;
      n_w      <= '0;
      cnt      <= '0;
      res_bank <= 1'b0;
      rd_q     <= 1'b0;
      rd_idx_q <= '0;
      che_n    <= 1'b1;
      dp_start <= 1'b0;
      done     <= 1'b0;
    end else begin
      done     <= 1'b0;
      dp_start <= 1'b0;
      rd_q     <= 1'b0;
      unique case (state)
        U_IDLE: begin
          che_n <= 1'b1;
          if (start) begin
            mode_q <= mode;
            lp_q   <= log2_pts;
            n_pts  <= (AW + 1)'(1) << log2_pts;
            n_half <= (AW + 1)'(1) << (log2_pts - 4'd1);
            n_w    <= ((AW + 1)'(1) << (log2_pts - 4'd1)) * (AW + 1)'(log2_pts);
            cnt    <= '0;
            state  <= U_LOAD_X;
          end
        end
        U_LOAD_X: if (take || pad) begin
          cnt <= cnt + 1'b1;
          if (cnt + 1'b1 == n_pts) begin
            cnt   <= '0;
            state <= U_LOAD_W;
          end
        end
        U_LOAD_W: if (take) begin
          cnt <= cnt + 1'b1;
          if (cnt + 1'b1 == n_w) begin
            cnt   <= '0;
            state <= is_dct ? U_LOAD_H : U_FFT;
            che_n <= is_dct ? 1'b1 : 1'b0;
          end
        end
        U_LOAD_H: if (take) begin
          cnt <= cnt + 1'b1;
          if (cnt + 1'b1 == n_half) begin
            cnt   <= '0;
            state <= U_FFT;
            che_n <= 1'b0;
          end
        end
        U_FFT: if (fft_cmp) begin
          res_bank <= osto;
          che_n    <= 1'b1;
          unique case (mode_q)
            MODE_DCT_BFLY: state <= U_RELEASE;
            MODE_DCT_PIPE: begin
              state    <= U_DCTPIPE;
              dp_start <= 1'b1;
            end
            default: state <= U_UNLOAD;
          endcase
        end
        U_RELEASE: begin
          // CHE high for a clock returns the generator to idle.
          che_n <= 1'b0;
          state <= U_DCT;
        end
        U_DCT: if (fft_cmp) begin
          res_bank <= osto;
          che_n    <= 1'b1;
          state    <= U_UNLOAD;
        end
        U_UNLOAD: begin
          rd_q     <= 1'b1;
          rd_idx_q <= cnt[AW-1:0];
          cnt      <= cnt + 1'b1;
          if (cnt + 1'b1 == (mode_q == MODE_FFT ? n_pts : n_half)) state <= U_DRAIN;
        end
        U_DCTPIPE: if (dp_done) begin
          done  <= 1'b1;
          state <= U_IDLE;
        end
        U_DRAIN: begin
          done  <= 1'b1;
          state <= U_IDLE;
        end
        default: state <= U_IDLE;
      endcase
    end
  end

endmodule
