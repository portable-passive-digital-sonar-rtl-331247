// axi_serializer: parallel-to-serial converter from the 16 beams to an
// AXI-Stream master, giving the processor the bearing-time (BTR) vector.
//
// Each clock cycle one beam is placed, zero-extended, on m_axis_tdata, in the
// order din[0], din[1], ... din[N_IN-1], din[0], ... . A frame is `intime`
// words long: m_axis_tlast marks the intime-th word, and the cycle after it is
// a gap with m_axis_tvalid low and data 0; the next frame then starts again at
// din[0]. With intime = N_IN (16) every frame is exactly one BTR vector, as in
// the document's waveforms (d1 .. d16 with tlast on d16, one idle cycle, d1 ..).
// intime values of 0 and 1 give one-word frames. During reset tvalid is low and
// the data is 0. All byte strobes are high.
//
// As in the document the stream has no tready: the receiver must accept one
// word per cycle. The beams are read as they are, so a frame may straddle a
// beam update. The register structure is this design's own.
//
// Timing: outputs are registered; the first word (din[0]) appears in the first
// cycle after reset is released.
module axi_serializer #(
  parameter int N_IN     = 16,
  parameter int DATA_W   = 12,
  parameter int AXIS_W   = 32,
  parameter int INTIME_W = 12
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [DATA_W-1:0]     din [N_IN],
  input  logic [INTIME_W-1:0]   intime,
  output logic                  m_axis_tvalid,
  output logic [AXIS_W-1:0]     m_axis_tdata,
  output logic [AXIS_W/8-1:0]   m_axis_tstrb,
  output logic                  m_axis_tlast
);
  localparam int IW = $clog2(N_IN);

  logic [IW-1:0]       ch;
  logic [INTIME_W-1:0] word_cnt;   // words already sent in this frame
  logic                last_word;

  assign m_axis_tstrb = '1;
  assign last_word    = (INTIME_W+1)'(word_cnt) + 1'b1 >= (INTIME_W+1)'(intime);

  always_ff @(posedge clk) begin
    if (rst) begin
      m_axis_tvalid <= 1'b0;
      m_axis_tdata  <= '0;
      m_axis_tlast  <= 1'b0;
      ch            <= '0;
      word_cnt      <= '0;
    end else if (m_axis_tvalid && m_axis_tlast) begin
      // gap cycle after the end of a frame
      m_axis_tvalid <= 1'b0;
      m_axis_tdata  <= '0;
      m_axis_tlast  <= 1'b0;
      ch            <= '0;
      word_cnt      <= '0;
    end else begin
      m_axis_tvalid <= 1'b1;
      m_axis_tdata  <= AXIS_W'(din[ch]);
      m_axis_tlast  <= last_word;
      ch            <= (ch == IW'(N_IN - 1)) ? '0 : ch + 1'b1;
      word_cnt      <= word_cnt + 1'b1;
    end
  end
endmodule
