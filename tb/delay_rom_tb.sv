// delay_rom_tb: every entry against tau = 256*mic*d*sin(theta)*fs/c
// (d = 0.04 m, fs = 48828.125 Hz, c = 343 m/s), within one LSB, with one
// cycle of read latency.
module delay_rom_tb;
  import sl_pkg::*;
  logic clk = 0;
  logic [$clog2(N_DIR*N_MIC)-1:0] addr = '0;
  logic signed [DELAY_W-1:0] q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  delay_rom dut (.*);

  initial begin
    for (int j = 0; j < N_DIR; j++) begin
      for (int i = 0; i < N_MIC; i++) begin
        real th, t;
        @(negedge clk) addr = ($clog2(N_DIR*N_MIC))'(j * N_MIC + i);
        @(negedge clk);
        th = (DIR_MIN_DEG + DIR_STEP_DEG * j) * 3.14159265358979 / 180.0;
        t  = 256.0 * i * 0.04 * $sin(th) * 48828.125 / 343.0;
        checks++;
        if (real'(q) - t > 1.0 || t - real'(q) > 1.0) begin
          failures++;
          if (failures < 10) $display("FAIL dir %0d mic %0d: %0d vs %f", j, i, q, t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
