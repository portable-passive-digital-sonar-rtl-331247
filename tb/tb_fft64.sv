// tb_fft64: frames of 64 unsigned 12-bit samples go in; the 64 bins that come
// out are compared with a direct DFT computed here, X[m]/64 of the samples
// minus mid-scale, within +-3 LSB per component. Frames: a cosine on bin 5,
// a sine on bin 11 plus a DC offset, full-scale random frames. Also checked:
// bins in natural order with out_last on bin 63; 194 cycles from the edge that
// accepts the 64th sample to the first bin when the engine is idle; and that
// three frames fed back-to-back (one sample per cycle) raise `overrun` for the
// frame that could not be transformed in time.
module tb_fft64;
  localparam int N = 64;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0;
  logic [11:0] din = '0;
  logic out_valid, out_last, overrun;
  logic [5:0] out_index;
  logic signed [11:0] out_re, out_im;
  int checks = 0, failures = 0, overruns = 0, frames_out = 0;
  int cyc = 0, last_in_cyc = 0;
  int frame [N];

  fft64 dut (.clk, .rst, .in_valid, .din, .out_valid, .out_index, .out_re, .out_im, .out_last, .overrun);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (overrun) overruns++;
  end

  task automatic send(int gap);
    for (int i = 0; i < N; i++) begin
      @(posedge clk);
      din <= 12'(frame[i]);
      in_valid <= 1'b1;
      @(posedge clk);
      #1;
      last_in_cyc = cyc;
      in_valid <= 1'b0;
      if (gap > 1) repeat (gap - 1) @(posedge clk);
    end
  endtask

  task automatic receive_and_check(bit check_latency);
    real xr, xi, pi = 3.14159265358979;
    int  er, ei;
    do begin @(posedge clk); #1; end while (!out_valid);
    if (check_latency) begin
      checks++;
      if (cyc - last_in_cyc != 194) begin failures++; $display("FAIL: latency %0d", cyc - last_in_cyc); end
    end
    for (int m = 0; m < N; m++) begin
      xr = 0.0; xi = 0.0;
      for (int n = 0; n < N; n++) begin
        xr += (frame[n] - 2048) * $cos(2.0 * pi * m * n / N);
        xi -= (frame[n] - 2048) * $sin(2.0 * pi * m * n / N);
      end
      er = int'($floor(xr / N + 0.5));
      ei = int'($floor(xi / N + 0.5));
      checks++;
      if (!out_valid || int'(out_index) != m || out_last != (m == N - 1) ||
          int'(out_re) - er > 3 || er - int'(out_re) > 3 || int'(out_im) - ei > 3 || ei - int'(out_im) > 3) begin
        failures++;
        $display("FAIL: bin %0d (index %0d valid %b): %0d,%0dj, expected %0d,%0dj",
                 m, out_index, out_valid, out_re, out_im, er, ei);
      end
      @(posedge clk); #1;
    end
    frames_out++;
  endtask

  initial begin
    real pi = 3.14159265358979;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // cosine on bin 5
    for (int n = 0; n < N; n++) frame[n] = 2048 + int'($floor(1800.0 * $cos(2.0 * pi * 5 * n / N) + 0.5));
    send(3);
    receive_and_check(1);
    // sine on bin 11 with DC offset
    for (int n = 0; n < N; n++) frame[n] = 2300 + int'($floor(1000.0 * $sin(2.0 * pi * 11 * n / N) + 0.5));
    send(2);
    receive_and_check(1);
    // random frames
    for (int f = 0; f < 6; f++) begin
      for (int n = 0; n < N; n++) frame[n] = $urandom_range(0, 4095);
      send(1 + f % 3);
      receive_and_check(1);
    end
    // three frames back to back: the second waits, the third overwrites it
    checks++;
    if (overruns != 0) begin failures++; $display("FAIL: overrun without cause"); end
    for (int f = 0; f < 3; f++) begin
      for (int n = 0; n < N; n++) begin
        @(posedge clk);
        din <= 12'($urandom);
        in_valid <= 1'b1;
      end
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (600) @(posedge clk);
    checks++;
    if (overruns != 1) begin failures++; $display("FAIL: expected one overrun, saw %0d", overruns); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
