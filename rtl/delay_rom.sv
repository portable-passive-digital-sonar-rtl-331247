// delay_rom: steering-delay table of the delay-and-sum beamformer.
//
// For each of N_ANGLES bearings it holds one delay per array channel, in
// samples. The table is computed at elaboration from the array geometry with
// the document's delay formula tau = d*sin(90deg - theta)/c = d*cos(theta)/c:
// channel m (position m*d along the array) is delayed by
//   D[k][m] = round( FS * d/c * (m*cos(theta_k) - min(0, (N_CH-1)*cos(theta_k))) )
// so that every delay is non-negative and the channel reached last by the
// wavefront gets delay 0. The bearings are theta_k = k * 180/(N_ANGLES-1)
// degrees, k = 0..N_ANGLES-1, spanning the 180-degree field of a linear array
// with both end-fire directions included (this spacing is this design's
// choice). With the default 3 elements, 37.8 cm, 333 m/s and 500 kS/s the
// largest entry is 1135 samples, which fits the 12-bit entries.
//
// Interface: combinational read; angle selects the row, delay[] is the row.
module delay_rom #(
  parameter int  N_CH      = 3,
  parameter int  N_ANGLES  = 16,
  parameter int  DELAY_W   = 12,
  parameter real FS_HZ     = 500000.0,
  parameter real SPACING_M = 0.378,
  parameter real SOUND_MPS = 333.0
) (
  input  logic [$clog2(N_ANGLES)-1:0] angle,
  output logic [DELAY_W-1:0]          delay [N_CH]
);
  localparam real PI = 3.14159265358979323846;

  function automatic int unsigned steer_delay(int k, int m);
    real th, c, lo;
    th = PI * k / (N_ANGLES - 1);
    c  = $cos(th);
    lo = (c < 0.0) ? (N_CH - 1) * c : 0.0;
    return int'($floor(FS_HZ * SPACING_M / SOUND_MPS * (m * c - lo) + 0.5));
  endfunction

  logic [DELAY_W-1:0] table_q [N_ANGLES][N_CH];

  for (genvar k = 0; k < N_ANGLES; k++) begin : g_angle
    for (genvar m = 0; m < N_CH; m++) begin : g_ch
      localparam int unsigned D = steer_delay(k, m);
      if (D >= 2**DELAY_W) begin : g_err
        $error("delay_rom: delay does not fit DELAY_W bits");
      end
      assign table_q[k][m] = DELAY_W'(D);
    end
  end

  always_comb begin
    for (int m = 0; m < N_CH; m++) delay[m] = table_q[angle][m];
  end
endmodule
