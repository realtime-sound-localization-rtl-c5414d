// trig_rom: cosine/sine table for one full turn in N_FFT steps.
//
// Entry p holds {cos(2*pi*p/N_FFT), sin(2*pi*p/N_FFT)}, each rounded to a
// signed TRIG_W-bit value with full scale 2**(TRIG_W-1)-1 = 2047. The table is
// a constant computed by a function at elaboration (a plain ROM after
// synthesis). Asynchronous read: the outputs follow the address in the same
// cycle. Used for the FFT twiddle factors (W^p = cos - j*sin) and for the
// steering phasors of the weight block. The shared table and its 12-bit
// precision are this design's choice.
module trig_rom
  import sl_pkg::*;
(
  input  logic [LOG2_N-1:0]        addr,
  output logic signed [TRIG_W-1:0] cos_o,
  output logic signed [TRIG_W-1:0] sin_o
);
  typedef logic [2*TRIG_W-1:0] table_t [N_FFT];

  function automatic table_t make_table();
    table_t t;
    real    fs, c, s;
    fs = real'((1 << (TRIG_W - 1)) - 1);
    for (int p = 0; p < N_FFT; p++) begin
      c = fs * $cos(2.0 * PI * p / N_FFT);
      s = fs * $sin(2.0 * PI * p / N_FFT);
      t[p] = {TRIG_W'($rtoi($floor(c + 0.5))), TRIG_W'($rtoi($floor(s + 0.5)))};
    end
    return t;
  endfunction

  localparam table_t ROM = make_table();

  assign cos_o = ROM[addr][2*TRIG_W-1:TRIG_W];
  assign sin_o = ROM[addr][TRIG_W-1:0];
endmodule
