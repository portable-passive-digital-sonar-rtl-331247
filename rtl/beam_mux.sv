// beam_mux: bearing selector in front of the spectral (LOFAR) path.
//
// Picks one of the N_ANGLES beams for the lowpass filter and FFT. The
// selection comes from the processor as a 32-bit word of which only the low
// log2(N_ANGLES) bits are used, as the document describes. The output and its
// valid strobe are registered (one cycle), which is this design's choice.
module beam_mux #(
  parameter int N_ANGLES = 16,
  parameter int DATA_W   = 12,
  parameter int SEL_W    = 32
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] beams [N_ANGLES],
  input  logic [SEL_W-1:0]  sel,
  output logic              out_valid,
  output logic [DATA_W-1:0] dout
);
  localparam int IW = $clog2(N_ANGLES);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= in_valid;
      dout      <= beams[sel[IW-1:0]];
    end
  end
endmodule
