// fft_core_tb: two 1024-sample packets (random complex noise, then a real
// tone plus noise) against a direct DFT computed in real arithmetic,
// expected output X[k]/N in bit-reversed order, within TOL LSB. Also checks
// the packet framing (sop on the first and eop on the last output word) and
// the compute latency: the first output word appears
// (N/2)*log2(N) + 1 cycles after the input eop.
module fft_core_tb;
  import sl_pkg::*;
  localparam int N = 1024, LOGN = 10, TOL = 4;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, clear = 0;
  logic sink_valid = 0, sink_sop = 0, sink_eop = 0, sink_ready;
  logic signed [13:0] sink_real = '0, sink_imag = '0;
  logic source_valid, source_sop, source_eop;
  logic signed [13:0] source_real, source_imag;
  int checks = 0, failures = 0;
  real xr [N], xi [N];
  longint cyc = 0, eop_cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  fft_core #(.N(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int rev(input int a);
    int r = 0;
    for (int i = 0; i < LOGN; i++) if (a & (1 << i)) r |= 1 << (LOGN - 1 - i);
    return r;
  endfunction

  task automatic run_packet(input int kind);
    for (int n = 0; n < N; n++) begin
      if (kind == 0) begin
        xr[n] = real'(int'($urandom_range(8000)) - 4000);
        xi[n] = real'(int'($urandom_range(8000)) - 4000);
      end else begin
        xr[n] = real'($rtoi(6000.0 * $cos(2.0 * PI * 57.0 * n / N) + 0.5))
                + real'(int'($urandom_range(400)) - 200);
        xi[n] = 0.0;
      end
    end
    wait (sink_ready);
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      sink_valid = 1; sink_sop = (n == 0); sink_eop = (n == N - 1);
      sink_real = 14'($rtoi(xr[n])); sink_imag = 14'($rtoi(xi[n]));
    end
    @(negedge clk) begin sink_valid = 0; sink_sop = 0; sink_eop = 0; end
    eop_cyc = cyc;
    for (int a = 0; a < N; a++) begin
      int k;
      real er, ei;
      @(posedge clk iff source_valid);
      if (a == 0) check(cyc - eop_cyc == (N / 2) * LOGN + 1, "compute latency");
      check(source_sop == (a == 0) && source_eop == (a == N - 1), "framing");
      k = rev(a);
      er = 0.0; ei = 0.0;
      for (int n = 0; n < N; n++) begin
        real c, s;
        c = $cos(2.0 * PI * k * n / N); s = $sin(2.0 * PI * k * n / N);
        er += xr[n] * c + xi[n] * s;
        ei += xi[n] * c - xr[n] * s;
      end
      er /= N; ei /= N;
      if (!(real'(source_real) - er < TOL && er - real'(source_real) < TOL && real'(source_imag) - ei < TOL && ei - real'(source_imag) < TOL)) $display("bin %0d got %0d,%0d want %f,%f", k, source_real, source_imag, er, ei);
      check(real'(source_real) - er < TOL && er - real'(source_real) < TOL &&
            real'(source_imag) - ei < TOL && ei - real'(source_imag) < TOL, "bin value");
      if (kind == 1 && (k == 57 || k == N - 57))
        check(source_real > 2900 && source_real < 3100, "tone peak");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_packet(0);
    run_packet(1);
    // clear during compute: the core must accept a new packet right after
    wait (sink_ready);
    for (int n = 0; n < N; n++) begin
      @(negedge clk); sink_valid = 1; sink_sop = (n == 0); sink_eop = (n == N - 1);
    end
    @(negedge clk) begin sink_valid = 0; sink_eop = 0; end
    repeat (100) @(negedge clk);
    check(!sink_ready, "busy while computing");
    clear = 1; @(negedge clk) clear = 0;
    check(sink_ready, "clear aborts");
    run_packet(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
