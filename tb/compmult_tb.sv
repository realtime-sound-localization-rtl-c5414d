// compmult_tb: random and corner complex operands against
// (ar + j ai)(br + j bi) = (ar*br - ai*bi) + j(ar*bi + ai*br).
module compmult_tb;
  localparam int AW = 14, BW = 12;
  logic signed [AW-1:0] a_re, a_im;
  logic signed [BW-1:0] b_re, b_im;
  logic signed [AW+BW:0] p_re, p_im;
  int checks = 0, failures = 0;
  compmult #(.AW(AW), .BW(BW)) dut (.*);

  task automatic try(input int ar, input int ai, input int br, input int bi);
    longint er, ei;
    a_re = AW'(ar); a_im = AW'(ai); b_re = BW'(br); b_im = BW'(bi);
    #1;
    er = longint'(ar) * br - longint'(ai) * bi;
    ei = longint'(ar) * bi + longint'(ai) * br;
    checks += 2;
    if (longint'(p_re) != er) failures++;
    if (longint'(p_im) != ei) failures++;
    if ((longint'(p_re) != er || longint'(p_im) != ei) && failures < 10)
      $display("FAIL (%0d,%0d)*(%0d,%0d) gave (%0d,%0d)", ar, ai, br, bi, p_re, p_im);
  endtask

  initial begin
    try(-8192, -8192, -2048, 2047);   // largest magnitude
    try(-8192, -8192, -2048, -2048);
    try(8191, -8192, 2047, -2048);
    try(1, 0, 0, 1);
    for (int i = 0; i < 2000; i++)
      try(int'($urandom_range(16383)) - 8192, int'($urandom_range(16383)) - 8192,
          int'($urandom_range(4095)) - 2048, int'($urandom_range(4095)) - 2048);
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
