// doa_sweep_tb: sweeps a tone source over the direction grid for one axis.
// For every grid direction from -85 to +85 degrees, and for three tone
// bins, four behavioural raw RAMs are filled with the block the microphones
// would record (microphone i delayed by i*d*sin(theta)*fs/c samples) and the
// axis chain is run. The estimate must be within one 5-degree grid step of
// the true direction and exact for at least 80% of the runs (the array
// is only 12 cm long, so near end-fire the beam is flat). Prints one line
// per run.
module doa_sweep_tb;
  import sl_pkg::*;
  localparam int N = 1024;
  localparam real TSCALE = MIC_SPACING_M * FS_HZ / SOUND_SPEED;
  localparam int BINS [3] = '{50, 75, 85};
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
  int checks = 0, failures = 0, runs = 0, exact = 0;
  always #10 clk = ~clk;

  for (genvar i = 0; i < N_MIC; i++) begin : g_ram
    always @(posedge clk) if (rdreq[i]) begin
      raw_q[i]  <= raw[i][rd_ptr[i] % N];
      rd_ptr[i] <= rd_ptr[i] + 1;
    end
  end

  axis_localizer #(.N(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run(input int bin, input int theta);
    for (int i = 0; i < N_MIC; i++) begin
      for (int n = 0; n < N; n++)
        raw[i][n] = 16'($rtoi(12000.0 * $sin(2.0 * PI * bin * (n - i * TSCALE * $sin(theta * PI / 180.0)) / N))
                        + int'($urandom_range(400)) - 200);
      rd_ptr[i] = 0;
    end
    @(negedge clk) go = 1;
    @(negedge clk) go = 0;
    repeat (3) @(negedge clk);
    ready = 1;
    wait (fftdone);
    ready = 0;
    wait (done);
    runs++;
    check(int'(maxbin) == bin, "dominant bin");
    check(int'(doa) - theta <= DIR_STEP_DEG && theta - int'(doa) <= DIR_STEP_DEG, "direction");
    if (int'(doa) == theta) exact++;
    $display("bin %0d  true %0d  estimate %0d", bin, theta, doa);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 3; b++)
      for (int t = -85; t <= 85; t += 5) run(BINS[b], t);
    check(exact * 5 >= runs * 4, "exact estimates");
    $display("%0d runs, %0d exact", runs, exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (110 * 9000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
