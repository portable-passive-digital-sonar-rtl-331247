// ad7476_model: behavioural model of one AD7476 12-bit serial ADC, for
// simulation only (not synthesizable logic).
//
// The falling edge of cs_n samples `value` and presents the first of 16 bits
// (four leading zeros, then the 12-bit result MSB first); each falling edge of
// sclk while cs_n is low presents the next bit. With cs_n high the output
// (tri-state on the real part) reads 0. `conversions` counts cs_n falls.
module ad7476_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic [11:0] value,
  output logic        sdata,
  output int          conversions
);
  logic [15:0] word;
  int          pos;

  initial begin
    sdata       = 1'b0;
    conversions = 0;
    pos         = 15;
    word        = '0;
  end

  always @(negedge cs_n) begin
    word        = {4'b0000, value};
    pos         = 15;
    sdata       = word[15];
    conversions = conversions + 1;
  end

  always @(negedge sclk) begin
    if (!cs_n && pos > 0) begin
      pos   = pos - 1;
      sdata = word[pos];
    end
  end

  always @(posedge cs_n) sdata = 1'b0;
endmodule
