// freqdetect_tb: a behavioural FFT RAM (bit-reversed order, one cycle read
// latency) holds random spectra with large values planted at DC, below
// MIN_BIN and in the upper half, which must all be ignored. maxbin must be
// the first bin of largest re^2+im^2 among MIN_BIN..N/2-1 (worked out by the
// testbench), detectdone must come N/2-MIN_BIN+1 cycles after fftdone and
// fall after fftdone falls.
module freqdetect_tb;
  import sl_pkg::*;
  localparam int N = 1024, LOGN = 10, MIN_BIN = 4;
  logic clk = 0, reset = 0, fftdone = 0;
  fft_word_t ramq, ram [N];
  logic [9:0] ramaddr, maxbin;
  logic detectdone;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) ramq <= ram[ramaddr];

  freqdetect #(.N(N), .MIN_BIN(MIN_BIN)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask
  function automatic int rev(input int a);
    int r = 0;
    for (int i = 0; i < LOGN; i++) if (a & (1 << i)) r |= 1 << (LOGN - 1 - i);
    return r;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    reset = 1;
    for (int t = 0; t < 12; t++) begin
      int peak, best, exp_bin;
      longint bestmag, m;
      int c0;
      for (int k = 0; k < N; k++) begin
        ram[rev(k)].re = 14'(int'($urandom_range(200)) - 100);
        ram[rev(k)].im = 14'(int'($urandom_range(200)) - 100);
      end
      ram[rev(0)] = '{re: 14'sd8000, im: 14'sd0};
      ram[rev(MIN_BIN - 1)] = '{re: -14'sd7000, im: 14'sd3000};
      ram[rev(700)] = '{re: 14'sd7900, im: 14'sd7900};
      peak = MIN_BIN + int'($urandom_range(N / 2 - 1 - MIN_BIN));
      if (t == 1) peak = MIN_BIN;
      if (t == 2) peak = N / 2 - 1;
      ram[rev(peak)] = '{re: 14'(-3000 - t), im: 14'(1500)};
      if (t == 3 && peak + 7 < N / 2) ram[rev(peak + 7)] = ram[rev(peak)];   // tie: the first wins
      bestmag = -1; exp_bin = 0;
      for (int k = MIN_BIN; k < N / 2; k++) begin
        m = longint'(ram[rev(k)].re) * ram[rev(k)].re + longint'(ram[rev(k)].im) * ram[rev(k)].im;
        if (m > bestmag) begin bestmag = m; exp_bin = k; end
      end
      @(negedge clk) fftdone = 1;
      c0 = 0;
      while (!detectdone) begin @(negedge clk); c0++; end
      check(c0 == N / 2 - MIN_BIN + 1, "detect latency");
      check(int'(maxbin) == exp_bin, "maxbin");
      repeat (5) @(negedge clk);
      check(detectdone && int'(maxbin) == exp_bin, "result held");
      fftdone = 0;
      @(negedge clk); @(negedge clk);
      check(!detectdone, "re-armed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
