// sum_norm: "sum and norm" stage of one delay-and-sum beam.
//
// Adds the N_CH time-aligned channel samples and divides the sum by N_CH, so
// the beam output is the channel mean, y = (1/N) * sum x_n, and stays within
// the 12-bit sample range (no overflow). The division is by a constant and
// truncates. The document says the sum is normalized back to the 12-bit ADC
// width and its delay-sum equation carries the 1/N factor; dividing by N (not
// shifting) is how this design reads the two together.
//
// Timing: one register stage; out_valid/dout follow in_valid/din by one cycle.
module sum_norm #(
  parameter int N_CH   = 3,
  parameter int DATA_W = 12
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] din [N_CH],
  output logic              out_valid,
  output logic [DATA_W-1:0] dout
);
  localparam int SUM_W = DATA_W + $clog2(N_CH + 1);

  logic [SUM_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int c = 0; c < N_CH; c++) sum += SUM_W'(din[c]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) dout <= DATA_W'(sum / SUM_W'(N_CH));
    end
  end
endmodule
