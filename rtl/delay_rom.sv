// delay_rom: steering delays of the microphone array, fixed at compile time.
//
// Entry dir*N_MIC + mic is the delay, in samples (signed Q7.8), with which a
// plane wave from direction DIR_MIN_DEG + DIR_STEP_DEG*dir reaches microphone
// mic after microphone 0:
//     tau = round(256 * mic * d * sin(theta) * fs / c)
// with mic spacing d = 0.04 m, fs = 50 MHz / 16 / 64 = 48828.125 Hz and
// c = 343 m/s (all three are this design's assumptions, set in sl_pkg). The document stores
// the complete delay matrix D in a preloaded ROM; this design stores the
// frequency-independent delays and forms D for the detected bin k as
// exp(+j*2*pi*k*tau/N) in the weight block, which keeps the table small.
// The table is a constant computed by a function at elaboration.
// Synchronous read, one cycle latency.
module delay_rom
  import sl_pkg::*;
(
  input  logic                               clk,
  input  logic [$clog2(N_DIR*N_MIC)-1:0]     addr,
  output logic signed [DELAY_W-1:0]          q
);
  typedef logic signed [DELAY_W-1:0] table_t [N_DIR*N_MIC];

  function automatic table_t make_table();
    table_t t;
    real    th, tau;
    for (int j = 0; j < N_DIR; j++) begin
      th = real'(DIR_MIN_DEG + DIR_STEP_DEG * j) * PI / 180.0;
      for (int i = 0; i < N_MIC; i++) begin
        tau = real'(1 << DELAY_FRAC) * i * MIC_SPACING_M * $sin(th) * FS_HZ / SOUND_SPEED;
        t[j*N_MIC + i] = DELAY_W'($rtoi($floor(tau + 0.5)));
      end
    end
    return t;
  endfunction

  localparam table_t ROM = make_table();

  always_ff @(posedge clk) q <= ROM[addr];
endmodule
