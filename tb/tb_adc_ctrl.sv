// tb_adc_ctrl: drives the AD7476 controller against three behavioural ADC
// models holding random values. Checks the returned 12-bit samples, the
// start-to-done latency (65 cycles), the 16 sclk periods per conversion, the
// sclk rate, cs_n framing, and that a start pulse while busy is ignored.
// A second controller built for 16 channels (sixteen converters on shared
// SCLK and CS, inputs held near half of full scale so that codes sit around
// 2048) runs from the same start pulses and must return all 16 samples, with
// the same timing as the 3-channel one.
module tb_adc_ctrl;
  localparam int N_CH = 3;
  logic clk = 1'b0, rst = 1'b1;
  logic start = 1'b0;
  logic [N_CH-1:0] sdata;
  logic sclk, cs_n, done, busy;
  logic [11:0] data [N_CH];
  logic [11:0] value [N_CH];
  int   conv [N_CH];
  int   checks = 0, failures = 0;

  adc_ctrl #(.N_CH(N_CH)) dut (.clk, .rst, .start, .sdata, .sclk, .cs_n, .data, .done, .busy);

  localparam int N16 = 16;
  logic [N16-1:0] sdata16;
  logic sclk16, cs_n16, done16, busy16;
  logic [11:0] data16 [N16];
  logic [11:0] value16 [N16];
  int   conv16 [N16];

  adc_ctrl #(.N_CH(N16)) dut16 (.clk, .rst, .start, .sdata(sdata16), .sclk(sclk16), .cs_n(cs_n16),
                                .data(data16), .done(done16), .busy(busy16));

  for (genvar c = 0; c < N16; c++) begin : g_adc16
    ad7476_model u_adc (.cs_n(cs_n16), .sclk(sclk16), .value(value16[c]), .sdata(sdata16[c]),
                        .conversions(conv16[c]));
  end

  for (genvar c = 0; c < N_CH; c++) begin : g_adc
    ad7476_model u_adc (.cs_n, .sclk, .value(value[c]), .sdata(sdata[c]), .conversions(conv[c]));
  end

  always #10 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int sclk_falls = 0;
  always @(negedge sclk) if (!cs_n) sclk_falls++;

  initial begin
    for (int c = 0; c < N_CH; c++) value[c] = '0;
    for (int c = 0; c < N16; c++) value16[c] = 12'd2048;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    check(cs_n && sclk, "idle: cs_n and sclk high");
    for (int t = 0; t < 40; t++) begin
      int lat;
      for (int c = 0; c < N_CH; c++) value[c] = 12'($urandom);
      if (t == 0) begin value[0] = 12'hFFF; value[1] = 12'h000; value[2] = 12'h800; end
      for (int c = 0; c < N16; c++) value16[c] = 12'(2048 - 24 + $urandom_range(0, 48));
      @(posedge clk);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      sclk_falls = 0;
      lat = 0;
      // a second start while busy must be ignored
      repeat (10) @(posedge clk);
      lat = 10;
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      lat++;
      while (!done) begin @(posedge clk); lat++; #1; if (done) break; end
      check(lat == 65, $sformatf("start-to-done latency 65 cycles (got %0d)", lat));
      check(done16, "16-channel controller done in the same cycle");
      for (int c = 0; c < N16; c++)
        check(data16[c] == value16[c], $sformatf("16-ch: channel %0d sample %03h (got %03h)", c, value16[c], data16[c]));
      for (int c = 0; c < N_CH; c++)
        check(data[c] == value[c], $sformatf("channel %0d sample %03h (got %03h)", c, value[c], data[c]));
      check(sclk_falls == 16, $sformatf("16 sclk periods per conversion (got %0d)", sclk_falls));
      @(posedge clk); #1;
      check(cs_n && !busy, "cs_n released after conversion");
      repeat (5 + $urandom_range(0, 20)) @(posedge clk);
    end
    check(conv[0] == 40, $sformatf("one conversion per accepted start (got %0d)", conv[0]));
    for (int c = 0; c < N16; c++)
      check(conv16[c] == 40, $sformatf("16-ch: converter %0d, one conversion per accepted start (got %0d)", c, conv16[c]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sclk must never be faster than clk/4 (12.5 MHz at 50 MHz)
  realtime last_edge = 0;
  always @(sclk) begin
    if (!cs_n && last_edge > 0) begin
      checks++;
      if ($realtime - last_edge < 39.9) begin failures++; $display("FAIL: sclk half period too short"); end
    end
    last_edge = $realtime;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
