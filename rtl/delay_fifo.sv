// delay_fifo: variable-depth delay line for one channel of the beamformer.
//
// Delays a stream of samples by `delay` samples (0 .. DEPTH-1). It is a
// circular buffer of DEPTH words: on each in_valid the new sample is written
// at the write pointer and the sample written `delay` samples earlier is read
// from wr_ptr - delay. The document uses a variable-depth FIFO core for this;
// the circular-buffer form, which lets the delay change without flushing, is
// this design's own. The buffer is not cleared: until `delay` samples have been
// written since reset the output is FILL (mid-scale by default) rather than
// stale memory contents.
//
// Timing: dout/out_valid are registered, one cycle after in_valid. With
// delay = 0 dout is the sample just written.
module delay_fifo #(
  parameter int DATA_W = 12,
  parameter int DEPTH  = 2048,
  parameter int DELAY_W = 12,
  parameter logic [DATA_W-1:0] FILL = DATA_W'(1 << (DATA_W - 1))
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic [DATA_W-1:0]  din,
  input  logic [DELAY_W-1:0] delay,
  output logic               out_valid,
  output logic [DATA_W-1:0]  dout
);
  localparam int AW = $clog2(DEPTH);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0]     wr_ptr;
  logic [AW:0]       fill_cnt;   // samples written since reset, saturates at DEPTH
  logic [AW-1:0]     rd_ptr;

  assign rd_ptr = wr_ptr - AW'(delay);

  always_ff @(posedge clk) begin
    if (in_valid) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr    <= '0;
      fill_cnt  <= '0;
      out_valid <= 1'b0;
      dout      <= FILL;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        wr_ptr <= wr_ptr + 1'b1;
        if (fill_cnt != (AW+1)'(DEPTH)) fill_cnt <= fill_cnt + 1'b1;
        if (delay == '0)
          dout <= din;
        else if ((AW+1)'(delay) > fill_cnt)
          dout <= FILL;
        else
          dout <= mem[rd_ptr];
      end
    end
  end

  if (DEPTH != 2**AW) begin : g_depth_err
    $error("delay_fifo: DEPTH must be a power of two");
  end

  // a delay longer than the buffer would read samples already overwritten
  a_delay_fits: assert property (@(posedge clk) disable iff (rst)
                                 in_valid |-> (int'(delay) < DEPTH));
endmodule
