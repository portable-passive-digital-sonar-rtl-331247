// tb_sonar_top: end-to-end run of the whole processing chain at its default
// size (3 channels, 16 bearings, 2048-word delay lines, 500 kS/s from a
// 50 MHz clock, 64-point FFT).
//
// A 1 kHz tone (amplitude 1500 around mid-scale) arrives as a plane wave from
// bearing index 5 (60 degrees): three behavioural AD7476 models return
// s[n + D[c]] with D = {0, 284, 568}, the arrival offsets of that bearing.
// Checked:
//  * beam 5 reproduces the source sample for sample once its delay lines are
//    primed (delay steering and sum/normalise);
//  * every AXI-Stream word equals the beam it carries, frames are 16 words,
//    tlast on the 16th, one idle cycle between frames;
//  * the bearing-time energy measured from the stream peaks at bearing 5;
//  * the bearing mux follows bearing_sel, which is switched from 5 to 0;
//  * every FFT frame matches a DFT of the 64 filtered samples it was fed
//    (+-3 LSB), with the FFT bins following each frame;
//  * sample period: ADC conversions 100 cycles apart.
// Each of these mechanisms is counted and must occur at least once.
module tb_sonar_top;
  localparam int    NA    = 16;
  localparam int    D [3] = '{0, 284, 568};
  localparam real   PI    = 3.14159265358979;

  logic clk = 1'b0, rst = 1'b1;
  logic [2:0]  adc_sdata;
  logic        adc_sclk, adc_cs_n;
  logic [31:0] bearing_sel = 32'hABCD_0005;   // upper bits are ignored
  logic [11:0] intime = 12'd16;
  logic        m_axis_tvalid, m_axis_tlast;
  logic [31:0] m_axis_tdata;
  logic [3:0]  m_axis_tstrb;
  logic        raw_valid;
  logic [11:0] raw_sample;
  logic        fft_valid, fft_last, fft_overrun;
  logic [5:0]  fft_index;
  logic signed [11:0] fft_re, fft_im;

  sonar_top dut (
    .clk, .rst, .adc_sdata, .adc_sclk, .adc_cs_n, .bearing_sel, .intime,
    .m_axis_tvalid, .m_axis_tdata, .m_axis_tstrb, .m_axis_tlast,
    .raw_valid, .raw_sample,
    .fft_valid, .fft_index, .fft_re, .fft_im, .fft_last, .fft_overrun
  );

  // ---------------- analog side: plane wave into three ADCs ----------------
  logic [11:0] adc_value [3];
  int          conv [3];
  int          n_next = 0;

  function automatic int src(int t);
    return 2048 + int'($floor(1500.0 * $sin(2.0 * PI * t / 500.0) + 0.5));
  endfunction

  for (genvar c = 0; c < 3; c++) begin : g_adc
    ad7476_model u_adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .value(adc_value[c]),
                        .sdata(adc_sdata[c]), .conversions(conv[c]));
  end

  initial for (int c = 0; c < 3; c++) adc_value[c] = 12'(src(D[c]));
  always @(posedge adc_cs_n) begin
    if (conv[0] > 0) begin
      n_next++;
      for (int c = 0; c < 3; c++) adc_value[c] = 12'(src(n_next + D[c]));
    end
  end

  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  // mechanism counters
  int n_conv = 0, n_beam5_ok = 0, n_frames = 0, n_gaps = 0, n_switch = 0;
  int n_mux_ok = 0, n_fft_frames = 0, n_primed = 0;

  // ---------------- ADC sample period ----------------
  int last_done = -1;
  always @(posedge clk) if (!rst && dut.adc_done) begin
    if (last_done >= 0) check(cyc - last_done == 100, "ADC sample period 100 cycles (500 kS/s)");
    last_done = cyc;
    n_conv++;
  end

  // ---------------- beam 5 equals the source ----------------
  int n_beam = 0;
  always @(posedge clk) if (!rst && dut.beam_valid[5]) begin
    if (n_beam >= 568) begin
      check(int'(dut.beams[5]) == src(n_beam), $sformatf("beam 5 sample %0d = %0d, source %0d",
                                                         n_beam, dut.beams[5], src(n_beam)));
      n_beam5_ok++;
    end else n_primed++;
    n_beam++;
  end

  // ---------------- AXI stream ----------------
  logic [11:0] beams_q [NA];
  int  word = 0;
  bit  in_gap = 1;   // reset ends a frame
  real energy [NA];
  int  n_energy [NA];
  initial for (int k = 0; k < NA; k++) begin energy[k] = 0.0; n_energy[k] = 0; end
  always @(posedge clk) begin
    if (!rst) begin
      check(m_axis_tstrb == 4'hF, "tstrb all ones");
      if (m_axis_tvalid) begin
        check(!in_gap || word == 0, "frame restarts at word 0");
        check(m_axis_tdata == 32'(beams_q[word]), $sformatf("stream word %0d carries beam %0d", word, word));
        check(m_axis_tlast == (word == 15), "tlast on the 16th word only");
        if (n_beam > 1200) begin
          energy[word] += (real'(m_axis_tdata) - 2048.0) ** 2;
          n_energy[word]++;
        end
        word = (word == 15) ? 0 : word + 1;
        if (m_axis_tlast) begin n_frames++; in_gap = 1; end
      end else begin
        check(in_gap && m_axis_tdata == 0, "idle cycle only after tlast, with data 0");
        if (in_gap) n_gaps++;
        in_gap = 0;
        word = 0;
      end
    end
    beams_q <= dut.beams;
  end

  // ---------------- bearing mux ----------------
  logic [3:0] sel_q;
  always @(posedge clk) begin
    if (!rst && dut.sel_valid) begin
      check(dut.sel_beam == dut.beams[sel_q],
            "mux output is the selected beam");
      n_mux_ok++;
    end
    sel_q <= bearing_sel[3:0];
  end

  // ---------------- FFT against a DFT of what it was fed ----------------
  int raw [$];
  int fft_frame_base = 0;
  always @(posedge clk) begin
    if (!rst && raw_valid) raw.push_back(int'(raw_sample));
    if (!rst && fft_valid) begin
      real xr, xi;
      int  er, ei, m;
      xr = 0.0;
      xi = 0.0;
      m = int'(fft_index);
      for (int n = 0; n < 64; n++) begin
        xr += (raw[fft_frame_base + n] - 2048) * $cos(2.0 * PI * m * n / 64.0);
        xi -= (raw[fft_frame_base + n] - 2048) * $sin(2.0 * PI * m * n / 64.0);
      end
      er = int'($floor(xr / 64.0 + 0.5));
      ei = int'($floor(xi / 64.0 + 0.5));
      check(int'(fft_re) - er <= 3 && er - int'(fft_re) <= 3 && int'(fft_im) - ei <= 3 && ei - int'(fft_im) <= 3,
            $sformatf("FFT bin %0d: %0d,%0dj expected %0d,%0dj", m, fft_re, fft_im, er, ei));
      if (fft_last) begin
        n_fft_frames++;
        fft_frame_base += 64;
      end
    end
    if (!rst) check(!fft_overrun, "no FFT overrun at the design sample rate");
  end

  initial begin
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    wait (n_beam == 1600);
    bearing_sel <= 32'h0000_0010;   // bearing 0 (bit 4 is ignored)
    n_switch++;
    wait (n_beam == 2000);
    repeat (400) @(posedge clk);
    begin
      int best = 0;
      for (int k = 0; k < NA; k++) begin
        energy[k] = energy[k] / (n_energy[k] > 0 ? n_energy[k] : 1);
        if (energy[k] > energy[best]) best = k;
      end
      $display("BTR energy per bearing:");
      for (int k = 0; k < NA; k++) $display("  bearing %2d : %0.0f", k, energy[k]);
      check(best == 5, $sformatf("BTR peak at bearing 5 (got %0d)", best));
      check(energy[5] > 1.0e6, "beam 5 carries the full tone power");
    end
    check(n_conv > 0,        "mechanism: ADC conversions");
    check(n_primed > 0,      "mechanism: delay-line priming");
    check(n_beam5_ok > 0,    "mechanism: steered beam reproduces the source");
    check(n_frames > 0,      "mechanism: AXI frames with tlast");
    check(n_gaps > 0,        "mechanism: idle cycle between frames");
    check(n_switch > 0 && n_mux_ok > 0, "mechanism: bearing selection switch");
    check(n_fft_frames >= 4, "mechanism: FFT frames");
    $display("conversions %0d, primed beam samples %0d, beam-5 checks %0d, AXI frames %0d, gaps %0d, bearing switches %0d, mux outputs %0d, FFT frames %0d",
             n_conv, n_primed, n_beam5_ok, n_frames, n_gaps, n_switch, n_mux_ok, n_fft_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
