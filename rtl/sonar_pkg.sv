// sonar_pkg: constants and types shared by the passive-sonar processing chain.
//
// The numbers below are the main configuration: a linear array of three
// microphones, 37.8 cm apart, sampled at 500 kS/s by 12-bit AD7476 converters,
// steered to 16 bearings. Samples are unsigned 12-bit integers throughout the
// beamformer (offset binary, mid-scale 2048 is silence). The speed of sound is
// the in-air value used for the array tests (333 m/s); for water use 1500 m/s.
// The system clock frequency (50 MHz) is this design's own choice: it makes the
// divide-by-100 sample-rate divider give exactly 500 kHz.
package sonar_pkg;
  localparam int SAMPLE_W   = 12;        // ADC resolution and beamformer data width
  localparam int N_CH       = 3;         // array elements = ADC channels
  localparam int N_ANGLES   = 16;        // steering angles (BTR resolution)
  localparam int ANGLE_W    = $clog2(N_ANGLES);
  localparam int DELAY_W    = 12;        // width of one entry of the delay ROM
  localparam int AXIS_W     = 32;        // AXI-Stream data width to the processor
  localparam int INTIME_W   = 12;        // width of the serializer frame-length input
  localparam int FFT_N      = 64;        // FFT size
  localparam int FIR_TAPS   = 16;        // lowpass taps

  localparam int unsigned CLK_HZ     = 50_000_000;
  localparam int unsigned FS_HZ      = 500_000;
  localparam real         SPACING_M  = 0.378;
  localparam real         SOUND_MPS  = 333.0;
  localparam real         FIR_FC_HZ  = 20_000.0;

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [DELAY_W-1:0]  delay_t;
endpackage
