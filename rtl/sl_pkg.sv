// sl_pkg: constants and types shared by the sound localizer.
//
// One acquisition is a block of N_FFT samples per microphone. Each sample is
// received as a 24-bit I2S word, kept as 16 bits in the raw RAMs and fed to
// the FFT as 14 bits. An FFT result word is a packed complex number of two
// signed 14-bit halves, real part in the upper half. Directions are scanned
// from DIR_MIN_DEG in DIR_STEP_DEG steps; the 5-degree grid of 37 directions
// (-90..+90) is this design's reading of the direction index/angle pairs in
// the weight block simulation. Trigonometric values are signed with
// TRIG_W bits and a full scale of 2**(TRIG_W-1)-1.
package sl_pkg;
  localparam int N_FFT        = 1024;
  localparam int LOG2_N       = 10;
  localparam int I2S_WORD_W   = 24;
  localparam int SAMPLE_W     = 16;
  localparam int FFT_IN_W     = 14;
  localparam int FFT_OUT_W    = 14;
  localparam int N_MIC        = 4;    // microphones per axis
  localparam int N_DIR        = 37;
  localparam int DIR_MIN_DEG  = -90;
  localparam int DIR_STEP_DEG = 5;
  localparam int TRIG_W       = 12;
  localparam int DELAY_W      = 16;   // steering delay, signed samples, Q7.8
  localparam int DELAY_FRAC   = 8;

  // Array and acoustics assumed for the steering delays (delay_rom)
  localparam real MIC_SPACING_M = 0.04;                    // metres
  localparam real SOUND_SPEED   = 343.0;                   // metres per second
  localparam real FS_HZ         = 50.0e6 / 16.0 / 64.0;    // 48828.125 Hz
  localparam real PI            = 3.14159265358979;

  typedef struct packed {
    logic signed [FFT_OUT_W-1:0] re;
    logic signed [FFT_OUT_W-1:0] im;
  } fft_word_t;

  // Bit-reversed index: the FFT emits its bins in bit-reversed order, so
  // bin k of the spectrum sits at FFT RAM address bitrev(k).
  function automatic logic [LOG2_N-1:0] bitrev(input logic [LOG2_N-1:0] a);
    for (int i = 0; i < LOG2_N; i++) bitrev[i] = a[LOG2_N-1-i];
  endfunction
endpackage
