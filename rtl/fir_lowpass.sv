// fir_lowpass: 16-tap lowpass FIR filter at the head of the spectral path.
//
// Direct-form FIR on unsigned 12-bit samples with a 20 kHz cutoff at the
// 500 kS/s sample rate, as the document specifies (tap count, cutoff and data
// widths). The document generates its coefficients with a filter-design tool
// and does not list them; here they are computed at elaboration as a
// Hamming-windowed sinc,
//   h[n] = 2*fc/fs * sinc(2*fc/fs * (n - (TAPS-1)/2)) * (0.54 - 0.46*cos(2*pi*n/(TAPS-1))),
// scaled so that the taps sum to 1.0 and quantized to COEF_FRAC fractional
// bits. With these settings all taps are positive, so the filter maps the
// unsigned 0..4095 range onto itself with unity gain at DC; the rounded result
// is saturated to 12 bits.
//
// Interface: in_valid/din is the sample stream; dout/out_valid follow one cycle
// later. y[n] = sum_k c[k] * x[n-k], where x[n] is the sample just accepted and
// the history starts at zero after reset.
module fir_lowpass #(
  parameter int  TAPS      = 16,
  parameter int  DATA_W    = 12,
  parameter int  COEF_FRAC = 15,
  parameter real FS_HZ     = 500000.0,
  parameter real FC_HZ     = 20000.0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] din,
  output logic              out_valid,
  output logic [DATA_W-1:0] dout
);
  localparam real PI     = 3.14159265358979323846;
  localparam int  COEF_W = COEF_FRAC + 2;
  localparam int  ACC_W  = DATA_W + COEF_W + $clog2(TAPS);

  function automatic real proto(int n);
    real f, t, s;
    f = FC_HZ / FS_HZ;
    t = n - (TAPS - 1) / 2.0;
    s = (t == 0.0) ? 2.0 * f : $sin(2.0 * PI * f * t) / (PI * t);
    return s * (0.54 - 0.46 * $cos(2.0 * PI * n / (TAPS - 1)));
  endfunction

  function automatic int coef(int n);
    real total;
    total = 0.0;
    for (int k = 0; k < TAPS; k++) total += proto(k);
    return int'($floor(proto(n) / total * (2.0 ** COEF_FRAC) + 0.5));
  endfunction

  logic signed [COEF_W-1:0] c [TAPS];
  for (genvar k = 0; k < TAPS; k++) begin : g_coef
    assign c[k] = COEF_W'(coef(k));
  end

  logic [DATA_W-1:0]        hist [TAPS-1]; // hist[0] is the previous sample
  logic signed [ACC_W-1:0]  acc;
  logic signed [ACC_W-1:0]  rounded;

  always_comb begin
    acc = '0;
    acc += ACC_W'(c[0]) * ACC_W'($signed({1'b0, din}));
    for (int k = 1; k < TAPS; k++)
      acc += ACC_W'(c[k]) * ACC_W'($signed({1'b0, hist[k-1]}));
    rounded = (acc + (ACC_W'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      dout      <= '0;
      for (int k = 0; k < TAPS - 1; k++) hist[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        hist[0] <= din;
        for (int k = 1; k < TAPS - 1; k++) hist[k] <= hist[k-1];
        if (rounded < 0)
          dout <= '0;
        else if (rounded > ACC_W'((1 << DATA_W) - 1))
          dout <= '1;
        else
          dout <= DATA_W'(rounded);
      end
    end
  end
endmodule
