// fft_wrapper_tb: a behavioural raw RAM answers rdreq one cycle later. The
// wrapper must wait for ready, request exactly N samples in N consecutive
// cycles, raise fftdone, and then hold X[k]/N of the samples at FFT RAM
// address bitrev(k) (checked against a direct DFT, within TOL LSB, for all
// N addresses). go must drop fftdone and a second block must work too.
// Block latency: N requests + (N/2)log2(N) + N output cycles + a few.
module fft_wrapper_tb;
  import sl_pkg::*;
  localparam int N = 1024, LOGN = 10, TOL = 4;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, go = 0, ready = 0;
  logic [13:0] data_in = '0;
  logic [9:0] rd_addr_fft = '0;
  logic fftdone, rdreq;
  fft_word_t ram_q;
  int checks = 0, failures = 0;
  logic signed [13:0] raw [N];
  int rd_ptr = 0, n_req = 0;
  longint cyc = 0, first_req = -1, last_req = -1, t_ready = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  fft_wrapper #(.N(N)) dut (.*);

  // raw RAM model: read in order on rdreq
  always @(posedge clk) if (rdreq) begin
    data_in <= raw[rd_ptr % N];
    rd_ptr  <= rd_ptr + 1;
    n_req++;
    if (first_req < 0) first_req = cyc;
    last_req = cyc;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int rev(input int a);
    int r = 0;
    for (int i = 0; i < LOGN; i++) if (a & (1 << i)) r |= 1 << (LOGN - 1 - i);
    return r;
  endfunction

  task automatic run_block(input real bin);
    for (int n = 0; n < N; n++)
      raw[n] = 14'($rtoi(5000.0 * $sin(2.0 * PI * bin * n / N)) + int'($urandom_range(600)) - 300);
    rd_ptr = 0; n_req = 0; first_req = -1;
    repeat (20) @(negedge clk);
    check(rdreq == 0 && !fftdone, "waits for ready");
    ready = 1; t_ready = cyc;
    fork
      wait (fftdone);
      repeat (3 * N + (N / 2) * LOGN) @(posedge clk);
    join_any
    disable fork;
    check(fftdone, "fftdone reached");
    ready = 0;
    check(n_req == N && last_req - first_req == N - 1, "N requests in a row");
    check(cyc - t_ready < N + (N / 2) * LOGN + N + 20, "block latency");
    for (int a = 0; a < N; a++) begin
      int k;
      real er, ei;
      @(negedge clk) rd_addr_fft = 10'(a);
      @(negedge clk);
      k = rev(a);
      er = 0.0; ei = 0.0;
      for (int n = 0; n < N; n++) begin
        er += real'(raw[n]) * $cos(2.0 * PI * k * n / N);
        ei -= real'(raw[n]) * $sin(2.0 * PI * k * n / N);
      end
      er /= N; ei /= N;
      check(real'(ram_q.re) - er < TOL && er - real'(ram_q.re) < TOL &&
            real'(ram_q.im) - ei < TOL && ei - real'(ram_q.im) < TOL, "spectrum");
    end
    check(fftdone, "fftdone held");
    @(negedge clk) go = 1;
    @(negedge clk) go = 0;
    check(!fftdone, "go clears fftdone");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_block(40.0);
    run_block(123.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
