// tb_delay_sum_angle: one beam at bearing index 3 (36 degrees), whose channel
// delays are 0, 459 and 918 samples. Random channel samples are fed with a
// random valid pattern; every beam value is checked against the mean of the
// three samples the testbench itself picks out of its history with those
// delays (mid-scale while a delay line is still filling). Latency: 2 cycles.
// A second part feeds a plane wave arriving from that bearing and checks that
// the beam reproduces the source exactly.
module tb_delay_sum_angle;
  localparam int D [3] = '{0, 459, 918};
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, beam_valid;
  logic [11:0] din [3], beam;
  int checks = 0, failures = 0;
  logic [11:0] hist [3][0:8191];
  int n = 0;

  delay_sum_angle #(.ANGLE(3)) dut (.clk, .rst, .in_valid, .din, .beam_valid, .beam);

  always #5 clk = ~clk;

  function automatic int src(int t);   // plane-wave source waveform
    return 2048 + int'($floor(1500.0 * $sin(2.0 * 3.14159265 * t / 97.0) + 0.5));
  endfunction

  initial begin
    for (int c = 0; c < 3; c++) din[c] = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 4000; t++) begin
      int e, s;
      @(posedge clk);
      for (int c = 0; c < 3; c++) begin
        if (t < 2000) din[c] <= 12'($urandom);
        // channel c hears the source D[c] samples early: x_c[n] = s[n + D[c]]
        else          din[c] <= 12'(src(t + D[c]));
      end
      in_valid <= 1'b1;
      #1;
      for (int c = 0; c < 3; c++) hist[c][n] = din[c];
      s = 0;
      for (int c = 0; c < 3; c++) s += (D[c] > n) ? 2048 : int'(hist[c][n - D[c]]);
      e = s / 3;
      n++;
      @(posedge clk);
      in_valid <= 1'b0;
      @(posedge clk); #1;
      checks++;
      if (!beam_valid || int'(beam) != e) begin
        failures++;
        $display("FAIL: sample %0d beam %0d valid %b expected %0d", n, beam, beam_valid, e);
      end
      if (t >= 3000) begin
        checks++;
        if (int'(beam) != src(t)) begin failures++; $display("FAIL: plane wave not reproduced at %0d", t); end
      end
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
