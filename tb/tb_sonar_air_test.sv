// tb_sonar_air_test: the in-air bearing test of the original system, run on
// the whole design at its default size. A loudspeaker 1 kHz tone arrives from
// 80 degrees, which lies between the grid bearings 6 (72) and 7 (84). The
// three behavioural AD7476 models sample the continuous plane wave, so the
// arrival offsets between sensors are fractional (about 98.6 samples per
// sensor spacing) and no beam matches the source exactly.
//
// The bearing-time energy of every beam is measured from the AXI-Stream over
// exactly four periods of the tone, after the delay lines are primed, and
// compared with the theoretical response of a 3-element delay-and-sum array,
//   E_k = A^2/2 * | (1/3) sum_m exp(j*2*pi*f*(tau_m - D[k][m]/fs)) |^2,
// with tau_m the true arrival offset and D[k][m] the rounded steering delays,
// both computed here from the geometry. Each beam must be within 3 % of full
// power of that value, and the strongest beam must be the one the theory
// predicts. With 37.8 cm spacing a 1 kHz tone in air (wavelength 33 cm) has
// strong ambiguity lobes: the printout shows how the energy spreads over
// the bearings. The LOFAR path runs on bearing 7; its FFT frames are counted.
module tb_sonar_air_test;
  localparam int    NA     = 16;
  localparam real   PI     = 3.14159265358979;
  localparam real   FS     = 500000.0;
  localparam real   SPACE  = 0.378;
  localparam real   SOUND  = 333.0;
  localparam real   FREQ   = 1000.0;
  localparam real   AMP    = 1500.0;
  localparam real   SRC_DEG = 80.0;
  localparam int    MEAS_FROM = 1200;   // beam samples; all lines primed by 1135
  localparam int    MEAS_LEN  = 2000;   // four periods of 1 kHz at 500 kS/s

  logic clk = 1'b0, rst = 1'b1;
  logic [2:0]  adc_sdata;
  logic        adc_sclk, adc_cs_n;
  logic [31:0] bearing_sel = 32'd7;
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

  // ---------------- analog side: continuous plane wave ----------------
  // Sensor m hears the source tau_m seconds early; the set is shifted so
  // that all offsets are non-negative.
  function automatic real tau(int m);
    real c0 = $cos(SRC_DEG * PI / 180.0);
    return SPACE / SOUND * (m * c0 - ((c0 < 0.0) ? 2.0 * c0 : 0.0));
  endfunction

  function automatic int sensor(int m, int n);
    real t = n / FS + tau(m);
    return 2048 + int'($floor(AMP * $sin(2.0 * PI * FREQ * t) + 0.5));
  endfunction

  logic [11:0] adc_value [3];
  int          conv [3];
  int          n_next = 0;

  for (genvar c = 0; c < 3; c++) begin : g_adc
    ad7476_model u_adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .value(adc_value[c]),
                        .sdata(adc_sdata[c]), .conversions(conv[c]));
  end

  initial for (int c = 0; c < 3; c++) adc_value[c] = 12'(sensor(c, 0));
  always @(posedge adc_cs_n) begin
    if (conv[0] > 0) begin
      n_next++;
      for (int c = 0; c < 3; c++) adc_value[c] = 12'(sensor(c, n_next));
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

  // ---------------- theoretical beam response ----------------
  function automatic real expected_power(int k);
    real ck = $cos(12.0 * k * PI / 180.0);
    real re = 0.0, im = 0.0;
    for (int m = 0; m < 3; m++) begin
      int  dk = int'($floor(FS * SPACE / SOUND * (m * ck - ((ck < 0.0) ? 2.0 * ck : 0.0)) + 0.5));
      real ph = 2.0 * PI * FREQ * (tau(m) - dk / FS);
      re += $cos(ph) / 3.0;
      im += $sin(ph) / 3.0;
    end
    return re * re + im * im;
  endfunction

  // ---------------- BTR energy from the stream ----------------
  int  n_beam = 0;
  always @(posedge clk) if (!rst && dut.beam_valid[0]) n_beam++;

  int  word = 0, n_frames = 0;
  real energy [NA];
  int  n_energy [NA];
  initial for (int k = 0; k < NA; k++) begin energy[k] = 0.0; n_energy[k] = 0; end
  always @(posedge clk) begin
    if (!rst && m_axis_tvalid) begin
      if (n_beam >= MEAS_FROM && n_beam < MEAS_FROM + MEAS_LEN) begin
        energy[word] += (real'(m_axis_tdata) - 2048.0) ** 2;
        n_energy[word]++;
      end
      word = m_axis_tlast ? 0 : word + 1;
      if (m_axis_tlast) n_frames++;
    end
  end

  int n_fft_frames = 0;
  always @(posedge clk) if (!rst) begin
    if (fft_valid && fft_last) n_fft_frames++;
    check(!fft_overrun, "no FFT overrun");
  end

  initial begin
    real full;
    int  best, best_exp;
    real e_meas [NA], e_exp [NA];
    full = AMP * AMP / 2.0;
    best = 0;
    best_exp = 0;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    wait (n_beam == MEAS_FROM + MEAS_LEN + 5);
    $display("bearing  angle  measured  expected   (fraction of full tone power)");
    for (int k = 0; k < NA; k++) begin
      e_meas[k] = energy[k] / (n_energy[k] > 0 ? n_energy[k] : 1) / full;
      e_exp[k]  = expected_power(k);
      $display("  %2d     %3d    %6.3f    %6.3f", k, 12 * k, e_meas[k], e_exp[k]);
      check(n_energy[k] > 0, $sformatf("bearing %0d measured", k));
      check(e_meas[k] - e_exp[k] < 0.03 && e_exp[k] - e_meas[k] < 0.03,
            $sformatf("bearing %0d energy %f, expected %f", k, e_meas[k], e_exp[k]));
      if (e_meas[k] > e_meas[best]) best = k;
      if (e_exp[k] > e_exp[best_exp]) best_exp = k;
    end
    $display("strongest bearing %0d (theory %0d); source at %0.0f degrees, between bearings 6 and 7",
             best, best_exp, SRC_DEG);
    check(best == best_exp, "strongest bearing as predicted");
    check(e_meas[7] > e_meas[6] && e_meas[6] > e_meas[5] && e_meas[7] > e_meas[8],
          "neighbourhood of the source: 84 > 72 > 60 and 84 > 96 degrees");
    check(n_frames > 0, "mechanism: BTR frames");
    check(n_fft_frames > 0, "mechanism: LOFAR FFT frames");
    $display("BTR frames %0d, FFT frames %0d", n_frames, n_fft_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
