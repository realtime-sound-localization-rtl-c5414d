// sound_localizer_tb: end-to-end test of the dual-axis localizer at its
// default parameters (1024-sample blocks, SCK = clk/16). Eight behavioural
// I2S microphones hear one tone of bin BIN; the source lies at THETA0 seen
// from axis 0 and at THETA1 seen from axis 1 (microphone m of an axis is
// delayed by m*d*sin(theta)*fs/c samples). The system starts by itself
// after reset; the testbench follows two complete blocks and checks:
//   - capture: ready rises one block (1024 frames of 64*16 cycles, plus at
//     most one frame of alignment) after the start;
//   - estimate: both axes raise done with doa within 5 degrees of the truth
//     and the digits show it (dashes before the first estimate);
//   - restart: once both axes are done a new capture starts on its own
//     (ready falls) and the second block gives the same answer.
// Each of these mechanisms is counted and must have happened.
module sound_localizer_tb;
  import sl_pkg::*;
  localparam real PI = 3.14159265358979, TSCALE = 0.04 * 48828.125 / 343.0;
  localparam real BIN = 70.0;
  localparam int  THETA0 = 75, THETA1 = -20;
  localparam real S0 = $sin(THETA0 * PI / 180.0), S1 = $sin(THETA1 * PI / 180.0);
  localparam longint FRAME = 64 * 16;
  localparam logic [6:0] DIGIT [10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19,
                                        7'h12, 7'h02, 7'h78, 7'h00, 7'h10};
  logic clk = 0, rst_n = 0;
  logic [3:0] sd;
  logic sck, ws, ready;
  logic [1:0] done;
  logic signed [7:0] doa [2];
  logic [6:0] disp [2][3];
  logic [9:0] maxbin [2];
  int frame [4];
  int checks = 0, failures = 0;
  int n_capture = 0, n_estimate = 0, n_display = 0, n_restart = 0;
  longint cyc = 0;
  always #10 clk = ~clk;   // 50 MHz
  always @(posedge clk) cyc++;

  sound_localizer dut (.*);

  // SD lines 0,1 -> axis 0 (mics 0..3), SD lines 2,3 -> axis 1
  i2s_mic_model #(.BIN(BIN), .TAU_L(0.0),          .TAU_R(1.0 * TSCALE * S0)) m0 (.sck, .ws, .sd(sd[0]), .frame(frame[0]));
  i2s_mic_model #(.BIN(BIN), .TAU_L(2.0 * TSCALE * S0), .TAU_R(3.0 * TSCALE * S0)) m1 (.sck, .ws, .sd(sd[1]), .frame(frame[1]));
  i2s_mic_model #(.BIN(BIN), .TAU_L(0.0),          .TAU_R(1.0 * TSCALE * S1)) m2 (.sck, .ws, .sd(sd[2]), .frame(frame[2]));
  i2s_mic_model #(.BIN(BIN), .TAU_L(2.0 * TSCALE * S1), .TAU_R(3.0 * TSCALE * S1)) m3 (.sck, .ws, .sd(sd[3]), .frame(frame[3]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t doa=%0d,%0d", what, $time, doa[0], doa[1]); end
  endtask

  task automatic check_axis(input int a, input int theta);
    int m;
    m = doa[a] < 0 ? -int'(doa[a]) : int'(doa[a]);
    check(int'(doa[a]) - theta <= 5 && theta - int'(doa[a]) <= 5, "direction");
    check(disp[a][0] == DIGIT[m % 10] && disp[a][2] == (doa[a] < 0 ? 7'h3f : 7'h7f) &&
          disp[a][1] == (m < 10 ? 7'h7f : DIGIT[m / 10]), "display");
    if (disp[a][0] != 7'h3f) n_display++;
  endtask

  initial begin
    longint t0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    t0 = cyc;
    @(negedge clk);
    check(disp[0][0] == 7'h3f && disp[1][2] == 7'h3f, "dashes before the first estimate");
    for (int blk = 0; blk < 2; blk++) begin
      wait (ready);
      n_capture++;
      check(cyc - t0 >= 1024 * FRAME && cyc - t0 <= 1026 * FRAME, "capture time");
      wait (done == 2'b11);
      n_estimate++;
      repeat (2) @(negedge clk);
      check(maxbin[0] == 10'(int'(BIN)) && maxbin[1] == 10'(int'(BIN)), "dominant bin");
      check_axis(0, THETA0);
      check_axis(1, THETA1);
      $display("block %0d: axis 0 doa %0d (true %0d), axis 1 doa %0d (true %0d)",
               blk, doa[0], THETA0, doa[1], THETA1);
      wait (!ready);
      n_restart++;
      t0 = cyc;
    end
    check(n_capture == 2, "capture happened");
    check(n_estimate == 2, "estimate happened");
    check(n_display == 4, "display updated");
    check(n_restart == 2, "automatic restart happened");
    $display("mechanisms: capture %0d, estimate %0d, display %0d, restart %0d",
             n_capture, n_estimate, n_display, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2 * 1030 * FRAME + 50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
