// axis_localizer_tb: four behavioural raw RAMs hold one block of a tone
// (bin BIN) arriving from THETA at a four-microphone line array
// (microphone i delayed by i*d*sin(theta)*fs/c samples, d = 0.04 m,
// fs = 48828.125 Hz, c = 343 m/s). After ready the chain must run to done
// with maxbin = BIN, doa within one 5-degree step of THETA, and the three
// digits showing doa. go must restart the chain; a second block from a new
// direction is checked the same way.
module axis_localizer_tb;
  import sl_pkg::*;
  localparam int N = 1024;
  localparam real PI = 3.14159265358979, TSCALE = 0.04 * 48828.125 / 343.0;
  logic clk = 0, rst_n = 0, go = 0, ready = 0;
  logic [15:0] raw_q [N_MIC];
  logic [N_MIC-1:0] rdreq;
  logic fftdone, detectdone, done;
  logic [9:0] maxbin;
  logic signed [7:0] doa;
  logic [5:0] bnum;
  logic [6:0] disp2, disp1, disp0;
  logic [15:0] raw [N_MIC][N];
  int rd_ptr [N_MIC];
  int checks = 0, failures = 0;
  localparam logic [6:0] DIGIT [10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19,
                                        7'h12, 7'h02, 7'h78, 7'h00, 7'h10};
  always #5 clk = ~clk;

  for (genvar i = 0; i < N_MIC; i++) begin : g_ram
    always @(posedge clk) if (rdreq[i]) begin
      raw_q[i]  <= raw[i][rd_ptr[i] % N];
      rd_ptr[i] <= rd_ptr[i] + 1;
    end
  end

  axis_localizer #(.N(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t doa=%0d maxbin=%0d", what, $time, doa, maxbin); end
  endtask

  task automatic run(input int bin, input int theta);
    int m;
    for (int i = 0; i < N_MIC; i++) begin
      for (int n = 0; n < N; n++)
        raw[i][n] = 16'($rtoi(16000.0 * $sin(2.0 * PI * bin * (n - i * TSCALE * $sin(theta * PI / 180.0)) / N))
                        + int'($urandom_range(200)) - 100);
      rd_ptr[i] = 0;
    end
    @(negedge clk) go = 1;
    @(negedge clk) go = 0;
    check(!fftdone, "go clears fftdone");
    repeat (3) @(negedge clk);
    check(!detectdone && !done, "go re-arms detection and scan");
    ready = 1;
    wait (fftdone);
    ready = 0;
    wait (detectdone);
    check(int'(maxbin) == bin, "dominant bin");
    wait (done);
    @(negedge clk); @(negedge clk);
    check(int'(doa) - theta <= DIR_STEP_DEG && theta - int'(doa) <= DIR_STEP_DEG, "direction");
    m = doa < 0 ? -int'(doa) : int'(doa);
    check(disp0 == DIGIT[m % 10] && disp2 == (doa < 0 ? 7'h3f : 7'h7f), "display");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(disp0 == 7'h3f && disp1 == 7'h3f && disp2 == 7'h3f, "dashes before first estimate");
    run(90, 75);
    run(60, -40);
    run(110, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3 * 9000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
