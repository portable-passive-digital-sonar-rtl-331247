// sonar_top: programmable-logic part of a portable passive-sonar processor.
//
// Three microphones/hydrophones in a line feed AD7476 converters. This block
// samples them at 500 kS/s, steers the array to 16 bearings with 16 parallel
// delay-and-sum beams, and produces:
//   * the bearing-time vector: the 16 beam values, streamed to the processor
//     over a 32-bit AXI-Stream master (frames of `intime` words, 16 = one
//     vector per frame);
//   * the spectral (LOFAR) path of one bearing chosen by the processor
//     (bearing_sel, low 4 bits): 16-tap 20 kHz lowpass FIR, then 64-point FFT
//     whose bins are brought out for a register interface to the processor.
// The lowpass output is also brought out as the raw received signal of the
// chosen bearing, for recording or audio.
//
// Structure (document's architecture): clk_div -> adc_ctrl -> 16 x
// delay_sum_angle -> axi_serializer, and -> beam_mux -> fir_lowpass -> fft64.
// The processor, its register (GPIO) interface, the firmware that formats
// NMEA-0183 sentences for the display and the analog front end are outside
// this block; their signals are the ports below.
//
// Clocking: one clock, assumed 50 MHz (the sample-rate divider divides by 100);
// every slower rate is a clock enable. rst is synchronous and active high.
// Latency: beam values appear 68 cycles after the ADC start pulse (65 for the
// conversion, 3 through delay line and summer) once the delay lines hold
// enough history; FFT bins follow 194 cycles after the 64th sample of a frame
// reaches the FFT.
module sonar_top #(
  parameter int N_CH       = sonar_pkg::N_CH,
  parameter int N_ANGLES   = sonar_pkg::N_ANGLES,
  parameter int FIFO_DEPTH = 2048,
  parameter int DIV_HALF   = 50,
  parameter int SCLK_HALF  = 2
) (
  input  logic                              clk,
  input  logic                              rst,
  // ADC (Pmod AD1) pins
  input  logic [N_CH-1:0]                   adc_sdata,
  output logic                              adc_sclk,
  output logic                              adc_cs_n,
  // processor controls (from its register interface)
  input  logic [31:0]                       bearing_sel,
  input  logic [sonar_pkg::INTIME_W-1:0]    intime,
  // bearing-time vector, AXI-Stream master
  output logic                              m_axis_tvalid,
  output logic [sonar_pkg::AXIS_W-1:0]      m_axis_tdata,
  output logic [sonar_pkg::AXIS_W/8-1:0]    m_axis_tstrb,
  output logic                              m_axis_tlast,
  // filtered signal of the selected bearing
  output logic                              raw_valid,
  output sonar_pkg::sample_t                raw_sample,
  // spectrum of the selected bearing
  output logic                              fft_valid,
  output logic [$clog2(sonar_pkg::FFT_N)-1:0] fft_index,
  output logic signed [sonar_pkg::SAMPLE_W-1:0] fft_re,
  output logic signed [sonar_pkg::SAMPLE_W-1:0] fft_im,
  output logic                              fft_last,
  output logic                              fft_overrun
);
  import sonar_pkg::SAMPLE_W;

  logic               sample_tick;
  logic               div_clk;
  logic               adc_done;
  logic               adc_busy;
  sonar_pkg::sample_t adc_data [N_CH];
  sonar_pkg::sample_t beams [N_ANGLES];
  logic [N_ANGLES-1:0] beam_valid;
  logic               sel_valid;
  sonar_pkg::sample_t sel_beam;

  clk_div #(.HALF_COUNT(DIV_HALF)) u_div (
    .clk, .rst, .div_out(div_clk), .tick(sample_tick)
  );

  adc_ctrl #(.N_CH(N_CH), .SAMPLE_W(SAMPLE_W), .SCLK_HALF(SCLK_HALF)) u_adc (
    .clk, .rst,
    .start(sample_tick),
    .sdata(adc_sdata),
    .sclk (adc_sclk),
    .cs_n (adc_cs_n),
    .data (adc_data),
    .done (adc_done),
    .busy (adc_busy)
  );

  for (genvar k = 0; k < N_ANGLES; k++) begin : g_beam
    delay_sum_angle #(
      .ANGLE(k), .N_CH(N_CH), .N_ANGLES(N_ANGLES), .DEPTH(FIFO_DEPTH)
    ) u_beam (
      .clk, .rst,
      .in_valid  (adc_done),
      .din       (adc_data),
      .beam_valid(beam_valid[k]),
      .beam      (beams[k])
    );
  end

  axi_serializer #(
    .N_IN(N_ANGLES), .DATA_W(SAMPLE_W),
    .AXIS_W(sonar_pkg::AXIS_W), .INTIME_W(sonar_pkg::INTIME_W)
  ) u_ser (
    .clk, .rst,
    .din          (beams),
    .intime       (intime),
    .m_axis_tvalid(m_axis_tvalid),
    .m_axis_tdata (m_axis_tdata),
    .m_axis_tstrb (m_axis_tstrb),
    .m_axis_tlast (m_axis_tlast)
  );

  beam_mux #(.N_ANGLES(N_ANGLES), .DATA_W(SAMPLE_W), .SEL_W(32)) u_mux (
    .clk, .rst,
    .in_valid (beam_valid[0]),
    .beams    (beams),
    .sel      (bearing_sel),
    .out_valid(sel_valid),
    .dout     (sel_beam)
  );

  fir_lowpass #(
    .TAPS(sonar_pkg::FIR_TAPS), .DATA_W(SAMPLE_W),
    .FS_HZ(real'(sonar_pkg::FS_HZ)), .FC_HZ(sonar_pkg::FIR_FC_HZ)
  ) u_fir (
    .clk, .rst,
    .in_valid (sel_valid),
    .din      (sel_beam),
    .out_valid(raw_valid),
    .dout     (raw_sample)
  );

  fft64 #(.N(sonar_pkg::FFT_N), .IN_W(SAMPLE_W), .OUT_W(SAMPLE_W)) u_fft (
    .clk, .rst,
    .in_valid (raw_valid),
    .din      (raw_sample),
    .out_valid(fft_valid),
    .out_index(fft_index),
    .out_re   (fft_re),
    .out_im   (fft_im),
    .out_last (fft_last),
    .overrun  (fft_overrun)
  );

  // a new sample must never be requested while a conversion is running
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (rst)
                                         sample_tick |-> !adc_busy);
endmodule
