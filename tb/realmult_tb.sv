// realmult_tb: random and corner operands against the integer product.
module realmult_tb;
  localparam int AW = 14, BW = 12;
  logic signed [AW-1:0] a;
  logic signed [BW-1:0] b;
  logic signed [AW+BW-1:0] p;
  int checks = 0, failures = 0;
  realmult #(.AW(AW), .BW(BW)) dut (.*);

  task automatic try(input int x, input int y);
    a = AW'(x); b = BW'(y);
    #1;
    checks++;
    if (int'(p) != x * y) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d gave %0d", x, y, p);
    end
  endtask

  initial begin
    try(-8192, -2048); try(8191, 2047); try(-8192, 2047); try(0, -5); try(-1, -1);
    for (int i = 0; i < 2000; i++)
      try(int'($urandom_range(16383)) - 8192, int'($urandom_range(4095)) - 2048);
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
