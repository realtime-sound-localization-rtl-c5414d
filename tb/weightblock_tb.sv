// weightblock_tb: behavioural FFT RAMs hold, at bin k, the spectra four
// microphones would see for a plane wave from theta0 (d = 0.04 m,
// fs = 48828.125 Hz, c = 343 m/s, microphone i delayed by
// i*d*sin(theta0)*fs/c samples) plus a little noise. The testbench computes
// the Bartlett power of all 37 directions in real arithmetic; doa must be
// its maximum (or a direction within 1% of it, to allow for the
// fixed-point rounding). Also checks ramaddr = bitrev(k), done after
// 3 + 37*9 = 336 cycles, and re-arming when detectdone falls.
module weightblock_tb;
  import sl_pkg::*;
  localparam int N = 1024, LOGN = 10;
  localparam real PI = 3.14159265358979, TSCALE = 0.04 * 48828.125 / 343.0;
  logic clk = 0, reset = 0, detectdone = 0;
  logic [9:0] maxbin = '0, ramaddr;
  fft_word_t ramq [N_MIC], spec [N_MIC];
  logic done;
  logic signed [7:0] doa;
  logic [5:0] bnum;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  // the RAMs only matter at the addressed bin: model them as one word each
  // that is valid when ramaddr = bitrev(k)
  int cur_k = 0;
  always @(posedge clk)
    for (int i = 0; i < N_MIC; i++) ramq[i] <= (int'(ramaddr) == rev(cur_k)) ? spec[i] : '0;

  weightblock #(.N(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask
  function automatic int rev(input int a);
    int r = 0;
    for (int i = 0; i < LOGN; i++) if (a & (1 << i)) r |= 1 << (LOGN - 1 - i);
    return r;
  endfunction

  task automatic run(input int k, input real theta0_deg);
    real pw [N_DIR], pmax, th0;
    int c, jbest, jdut;
    th0 = theta0_deg * PI / 180.0;
    for (int i = 0; i < N_MIC; i++) begin
      real ph;
      ph = -2.0 * PI * k * i * TSCALE * $sin(th0) / N + 0.3;
      spec[i].re = 14'($rtoi(3000.0 * $cos(ph)) + int'($urandom_range(60)) - 30);
      spec[i].im = 14'($rtoi(3000.0 * $sin(ph)) + int'($urandom_range(60)) - 30);
    end
    pmax = -1.0; jbest = 0;
    for (int j = 0; j < N_DIR; j++) begin
      real yr, yi, th;
      th = (DIR_MIN_DEG + DIR_STEP_DEG * j) * PI / 180.0;
      yr = 0.0; yi = 0.0;
      for (int i = 0; i < N_MIC; i++) begin
        real ph;
        ph = 2.0 * PI * k * i * TSCALE * $sin(th) / N;
        yr += real'(spec[i].re) * $cos(ph) - real'(spec[i].im) * $sin(ph);
        yi += real'(spec[i].re) * $sin(ph) + real'(spec[i].im) * $cos(ph);
      end
      pw[j] = yr * yr + yi * yi;
      if (pw[j] > pmax) begin pmax = pw[j]; jbest = j; end
    end
    cur_k = k;
    @(negedge clk) begin maxbin = 10'(k); detectdone = 1; end
    c = 0;
    while (!done) begin @(negedge clk); c++; end
    check(c == 3 + N_DIR * (2 * N_MIC + 1), "scan latency");
    check(int'(ramaddr) == rev(k), "ram address");
    jdut = (int'(doa) - DIR_MIN_DEG) / DIR_STEP_DEG;
    check((int'(doa) - DIR_MIN_DEG) % DIR_STEP_DEG == 0 && jdut >= 0 && jdut < N_DIR &&
          (jdut == jbest || pw[jdut] > 0.99 * pmax), "doa");
    if (failures > 0 && failures < 10)
      $display("k=%0d theta0=%f doa=%0d expected %0d", k, theta0_deg, doa, DIR_MIN_DEG + DIR_STEP_DEG * jbest);
    repeat (3) @(negedge clk);
    check(done, "done held");
    detectdone = 0;
    @(negedge clk); @(negedge clk);
    check(!done, "re-armed");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset = 1;
    run(80, 75.0);
    run(80, -45.0);
    run(60, 0.0);
    run(100, 30.0);
    run(100, -30.0);
    for (int t = 0; t < 20; t++)
      run(40 + int'($urandom_range(60)), real'(int'($urandom_range(160)) - 80));
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
