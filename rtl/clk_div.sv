// clk_div: sample-rate divider for the ADC controller.
//
// Counts system-clock cycles and toggles a square wave every HALF_COUNT
// cycles, as the document's divider does (toggle when a counter reaches 50).
// With the 50 MHz system clock assumed here this gives the 500 kHz sampling
// rate. Besides the square wave (div_out) the block gives a one-cycle pulse
// (tick) on every rising edge of div_out; the rest of the design uses that
// pulse as a clock enable instead of clocking logic from a derived clock,
// which is this design's own choice.
//
// Timing: div_out first rises HALF_COUNT cycles after reset is released. tick
// and each rising edge of div_out come from the same clock edge. Both have a
// period of 2*HALF_COUNT cycles.
module clk_div #(
  parameter int HALF_COUNT = 50
) (
  input  logic clk,
  input  logic rst,
  output logic div_out,
  output logic tick
);
  localparam int CW = $clog2(HALF_COUNT + 1);
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count   <= '0;
      div_out <= 1'b0;
      tick    <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (count == CW'(HALF_COUNT - 1)) begin
        count   <= '0;
        div_out <= ~div_out;
        tick    <= ~div_out;
      end else begin
        count <= count + 1'b1;
      end
    end
  end
endmodule
