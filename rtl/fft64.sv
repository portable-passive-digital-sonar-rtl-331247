// fft64: frame-based radix-2 FFT of the selected, filtered beam (LOFAR path).
//
// Transforms consecutive, non-overlapping frames of N (64) real samples. The
// document specifies a 64-point pipelined FFT with 12-bit input and output,
// generated by a third-party core generator; this block is a compact
// iterative implementation of the same function, chosen because the sample
// rate (500 kS/s) leaves about 100 clock cycles per sample:
//
//   * Input: unsigned 12-bit samples (offset binary) are converted to signed by
//     subtracting mid-scale, then written into a frame buffer.
//   * When a frame is complete it is copied, in bit-reversed order, into a
//     work array of complex values, and log2(N) decimation-in-time stages run,
//     one butterfly per clock (N/2 per stage):
//         t = W^k * b;  a' = (a + t)/2;  b' = (a - t)/2,   W = exp(-j*2*pi/N)
//     The halving in every stage keeps the values within the input range, so
//     the result is X[m]/N. Twiddles are Q(TW_FRAC) values computed at
//     elaboration from cos/sin.
//   * The N bins are then streamed out in natural order, one per cycle, as
//     signed 12-bit real and imaginary parts with their bin index; out_last
//     marks bin N-1.
//
// If a new frame completes while the previous one is still waiting for the
// engine, the waiting frame is lost and `overrun` pulses; this cannot happen
// at the design's sample rate. The iterative structure, the per-stage scaling
// and the overrun rule are this design's own choices.
//
// Timing: out_valid for bin 0 comes N/2*log2(N) + 2 cycles (194 for N = 64)
// after the clock edge that accepts the last sample of a frame, if the engine
// was idle; the N bins follow on consecutive cycles.
module fft64 #(
  parameter int N       = 64,
  parameter int IN_W    = 12,
  parameter int OUT_W   = 12,
  parameter int WORK_W  = 14,
  parameter int TW_FRAC = 12
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic [IN_W-1:0]         din,
  output logic                    out_valid,
  output logic [$clog2(N)-1:0]    out_index,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im,
  output logic                    out_last,
  output logic                    overrun
);
  localparam int  LOGN = $clog2(N);
  localparam int  TW_W = TW_FRAC + 2;
  localparam int  PW   = WORK_W + TW_W;
  localparam real PI   = 3.14159265358979323846;

  typedef enum logic [1:0] {IDLE, RUN, DRAIN} state_t;
  typedef struct packed {
    logic signed [WORK_W-1:0] re;
    logic signed [WORK_W-1:0] im;
  } cplx_t;

  function automatic int tw_cos(int k);
    return int'($floor($cos(2.0 * PI * k / N) * (2.0 ** TW_FRAC) + 0.5));
  endfunction
  function automatic int tw_sin(int k);
    return int'($floor(-$sin(2.0 * PI * k / N) * (2.0 ** TW_FRAC) + 0.5));
  endfunction

  function automatic logic [LOGN-1:0] bitrev(logic [LOGN-1:0] v);
    for (int b = 0; b < LOGN; b++) bitrev[b] = v[LOGN-1-b];
  endfunction

  function automatic logic signed [OUT_W-1:0] sat(logic signed [WORK_W-1:0] v);
    if (v > WORK_W'((1 << (OUT_W - 1)) - 1)) return OUT_W'((1 << (OUT_W - 1)) - 1);
    if (v < -WORK_W'(1 << (OUT_W - 1)))      return OUT_W'(-(1 << (OUT_W - 1)));
    return OUT_W'(v);
  endfunction

  // twiddle table W^k, k = 0 .. N/2-1
  logic signed [TW_W-1:0] w_re [N/2];
  logic signed [TW_W-1:0] w_im [N/2];
  for (genvar k = 0; k < N/2; k++) begin : g_tw
    assign w_re[k] = TW_W'(tw_cos(k));
    assign w_im[k] = TW_W'(tw_sin(k));
  end

  // ---------------- input frame buffer ----------------
  logic signed [IN_W-1:0] inbuf [N];
  logic [LOGN-1:0]        wr_idx;
  logic                   frame_ready;
  logic                   load;

  // ---------------- engine ----------------
  state_t                  state;
  cplx_t                   work [N];
  logic [$clog2(LOGN)-1:0] stage;
  logic [LOGN-2:0]         bf;      // butterfly within the stage
  logic [LOGN-1:0]         rd_idx;

  assign load = (state == IDLE) && frame_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_idx      <= '0;
      frame_ready <= 1'b0;
      overrun     <= 1'b0;
      for (int i = 0; i < N; i++) inbuf[i] <= '0;
    end else begin
      overrun <= 1'b0;
      if (load) frame_ready <= 1'b0;
      if (in_valid) begin
        inbuf[wr_idx] <= $signed({~din[IN_W-1], din[IN_W-2:0]});
        wr_idx        <= wr_idx + 1'b1;
        if (wr_idx == LOGN'(N - 1)) begin
          frame_ready <= 1'b1;
        end else if (wr_idx == '0 && frame_ready && !load) begin
          // the waiting frame starts being overwritten: drop it
          frame_ready <= 1'b0;
          overrun     <= 1'b1;
        end
      end
    end
  end

  // butterfly datapath (combinational)
  logic [LOGN-1:0]        i0, i1, half;
  logic [LOGN-2:0]        tw_idx;
  cplx_t                  a, b, a_n, b_n;
  logic signed [PW-1:0]   pr, pi_;
  logic signed [WORK_W+1:0] tr, ti;

  always_comb begin
    half   = LOGN'(1) << stage;
    i0     = LOGN'((({1'b0, bf} >> stage) << (stage + 1)) | ({1'b0, bf} & LOGN'(half - 1'b1)));
    i1     = i0 | half;
    tw_idx = (LOGN-1)'((bf & (LOGN-1)'(half - 1'b1)) << (LOGN'(LOGN - 1) - LOGN'(stage)));
    a      = work[i0];
    b      = work[i1];
    pr     = PW'(b.re) * PW'(w_re[tw_idx]) - PW'(b.im) * PW'(w_im[tw_idx]);
    pi_    = PW'(b.re) * PW'(w_im[tw_idx]) + PW'(b.im) * PW'(w_re[tw_idx]);
    // round the products back to WORK_W+2 bits
    tr     = (WORK_W+2)'((pr + (PW'(1) <<< (TW_FRAC - 1))) >>> TW_FRAC);
    ti     = (WORK_W+2)'((pi_ + (PW'(1) <<< (TW_FRAC - 1))) >>> TW_FRAC);
    a_n.re = WORK_W'(((WORK_W+2)'(a.re) + tr + (WORK_W+2)'(1)) >>> 1);
    a_n.im = WORK_W'(((WORK_W+2)'(a.im) + ti + (WORK_W+2)'(1)) >>> 1);
    b_n.re = WORK_W'(((WORK_W+2)'(a.re) - tr + (WORK_W+2)'(1)) >>> 1);
    b_n.im = WORK_W'(((WORK_W+2)'(a.im) - ti + (WORK_W+2)'(1)) >>> 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      stage     <= '0;
      bf        <= '0;
      rd_idx    <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_index <= '0;
      out_re    <= '0;
      out_im    <= '0;
      for (int i = 0; i < N; i++) work[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      unique case (state)
        IDLE: begin
          if (load) begin
            for (int i = 0; i < N; i++) begin
              work[i].re <= WORK_W'(inbuf[bitrev(LOGN'(i))]);
              work[i].im <= '0;
            end
            stage <= '0;
            bf    <= '0;
            state <= RUN;
          end
        end
        RUN: begin
          work[i0] <= a_n;
          work[i1] <= b_n;
          bf       <= bf + 1'b1;
          if (bf == '1) begin
            if (stage == ($clog2(LOGN))'(LOGN - 1)) begin
              state  <= DRAIN;
              rd_idx <= '0;
            end else begin
              stage <= stage + 1'b1;
            end
          end
        end
        DRAIN: begin
          out_valid <= 1'b1;
          out_index <= rd_idx;
          out_re    <= sat(work[rd_idx].re);
          out_im    <= sat(work[rd_idx].im);
          out_last  <= (rd_idx == '1);
          rd_idx    <= rd_idx + 1'b1;
          if (rd_idx == '1) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  initial begin
    assert (N == 2**LOGN && N >= 4) else $error("fft64: N must be a power of two >= 4");
  end
endmodule
