// delay_sum_angle: one steered beam of the delay-and-sum beamformer.
//
// Looks up the delays of bearing ANGLE in the delay ROM, delays each channel
// by its own delay_fifo, and averages the aligned channels in sum_norm. This is
// the document's "delay-sum for angle N" block; the beamformer holds one per
// bearing (16), all fed by the same ADC samples.
//
// Timing: beam_valid follows in_valid by two cycles (one in the delay line,
// one in the summer). Inputs are unsigned 12-bit samples with a common
// in_valid strobe.
module delay_sum_angle #(
  parameter int ANGLE    = 0,
  parameter int N_CH     = sonar_pkg::N_CH,
  parameter int N_ANGLES = sonar_pkg::N_ANGLES,
  parameter int DEPTH    = 2048
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  sonar_pkg::sample_t din [N_CH],
  output logic               beam_valid,
  output sonar_pkg::sample_t beam
);
  sonar_pkg::delay_t  delay [N_CH];
  sonar_pkg::sample_t aligned [N_CH];
  logic [N_CH-1:0]    aligned_valid;  // all equal; channel 0's drives the summer

  delay_rom #(
    .N_CH(N_CH), .N_ANGLES(N_ANGLES), .DELAY_W(sonar_pkg::DELAY_W),
    .FS_HZ(real'(sonar_pkg::FS_HZ)), .SPACING_M(sonar_pkg::SPACING_M),
    .SOUND_MPS(sonar_pkg::SOUND_MPS)
  ) u_rom (
    .angle($clog2(N_ANGLES)'(ANGLE)),
    .delay(delay)
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    delay_fifo #(
      .DATA_W(sonar_pkg::SAMPLE_W), .DEPTH(DEPTH), .DELAY_W(sonar_pkg::DELAY_W)
    ) u_fifo (
      .clk, .rst,
      .in_valid (in_valid),
      .din      (din[c]),
      .delay    (delay[c]),
      .out_valid(aligned_valid[c]),
      .dout     (aligned[c])
    );
  end

  sum_norm #(.N_CH(N_CH), .DATA_W(sonar_pkg::SAMPLE_W)) u_sum (
    .clk, .rst,
    .in_valid (aligned_valid[0]),
    .din      (aligned),
    .out_valid(beam_valid),
    .dout     (beam)
  );
endmodule
