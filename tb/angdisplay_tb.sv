// angdisplay_tb: dashes after reset, then every angle -90..90 in steps of
// 5 against an independent digit table; the display must hold its value
// while done is low.
module angdisplay_tb;
  logic clk = 0, reset = 0, done = 0;
  logic signed [7:0] doa = '0;
  logic [6:0] disp2, disp1, disp0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  angdisplay dut (.*);

  // segments {g,f,e,d,c,b,a}, active low
  localparam logic [6:0] DIGIT [10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19,
                                        7'h12, 7'h02, 7'h78, 7'h00, 7'h10};
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s doa=%0d", what, doa); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    reset = 1;
    @(negedge clk);
    check(disp2 == 7'h3f && disp1 == 7'h3f && disp0 == 7'h3f, "dashes after reset");
    for (int a = -90; a <= 90; a += 5) begin
      int m;
      m = a < 0 ? -a : a;
      @(negedge clk) begin doa = 8'(a); done = 1; end
      @(negedge clk) done = 0;
      check(disp2 == (a < 0 ? 7'h3f : 7'h7f), "sign");
      check(disp1 == (m < 10 ? 7'h7f : DIGIT[m / 10]), "tens");
      check(disp0 == DIGIT[m % 10], "units");
      doa = 8'(a + 3);
      @(negedge clk);
      check(disp0 == DIGIT[m % 10], "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
