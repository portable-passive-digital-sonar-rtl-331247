// tb_fir_lowpass: the 16-tap, 20 kHz lowpass FIR at 500 kS/s.
//  * Coefficients are worked out here from the windowed-sinc design
//    (Hamming window, taps normalised to sum 1, 15 fractional bits); the
//    response to a single sample of 4095 must reproduce them.
//  * Random input: every output is checked against the testbench's own
//    convolution, rounded and clamped to 0..4095.
//  * A constant input must settle to itself (unity DC gain, +-1 LSB) and a
//    tone at 125 kHz (fs/4, far in the stopband) must be attenuated to a
//    peak-to-peak swing of under 4% of its input swing.
// Latency: out_valid follows in_valid by one cycle.
module tb_fir_lowpass;
  localparam int TAPS = 16;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, out_valid;
  logic [11:0] din = '0, dout;
  int checks = 0, failures = 0;
  int coef [TAPS];
  int x [$];

  fir_lowpass dut (.clk, .rst, .in_valid, .din, .out_valid, .dout);

  always #5 clk = ~clk;

  function automatic void make_coefs();
    real h [TAPS];
    real sum = 0.0, fc = 0.04, pi = 3.14159265358979;
    for (int n = 0; n < TAPS; n++) begin
      real t = n - 7.5;
      h[n] = $sin(2.0 * pi * fc * t) / (pi * t) * (0.54 - 0.46 * $cos(2.0 * pi * n / 15.0));
      sum += h[n];
    end
    for (int n = 0; n < TAPS; n++) coef[n] = int'($floor(h[n] / sum * 32768.0 + 0.5));
  endfunction

  function automatic int model();
    longint acc = 0;
    for (int k = 0; k < TAPS; k++)
      if (x.size() - 1 - k >= 0) acc += longint'(coef[k]) * x[x.size() - 1 - k];
    acc = (acc + 16384) >>> 15;
    if (acc < 0) acc = 0;
    if (acc > 4095) acc = 4095;
    return int'(acc);
  endfunction

  task automatic push(int v, output int y);
    @(posedge clk);
    din <= 12'(v);
    in_valid <= 1'b1;
    x.push_back(v);
    @(posedge clk);
    in_valid <= 1'b0;
    #1;
    y = int'(dout);
    checks++;
    if (!out_valid || y != model()) begin
      failures++;
      $display("FAIL: sample %0d: out %0d valid %b, model %0d", x.size(), y, out_valid, model());
    end
  endtask

  initial begin
    int y, lo, hi;
    make_coefs();
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // impulse
    push(4095, y);
    checks++;
    if (y != (4095 * coef[0] + 16384) >>> 15) begin failures++; $display("FAIL: impulse tap 0"); end
    for (int k = 1; k < TAPS; k++) begin
      push(0, y);
      checks++;
      if (y != (4095 * coef[k] + 16384) >>> 15) begin failures++; $display("FAIL: impulse tap %0d: %0d", k, y); end
    end
    // random
    for (int i = 0; i < 3000; i++) push($urandom_range(0, 4095), y);
    // DC
    for (int i = 0; i < 40; i++) push(3000, y);
    checks++;
    if (y < 2999 || y > 3001) begin failures++; $display("FAIL: DC gain: %0d", y); end
    // stopband tone at fs/4: 2048 + 1500*{0,1,0,-1}
    lo = 4095; hi = 0;
    for (int i = 0; i < 200; i++) begin
      int v = (i % 4 == 1) ? 3548 : (i % 4 == 3) ? 548 : 2048;
      push(v, y);
      if (i > 40) begin if (y < lo) lo = y; if (y > hi) hi = y; end
    end
    checks++;
    if (hi - lo > 120) begin failures++; $display("FAIL: fs/4 tone not attenuated: %0d..%0d", lo, hi); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
