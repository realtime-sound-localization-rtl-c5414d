// i2s_capture_tb: four two-microphone I2S models feed the capture block.
// Every RAM write is compared with the sample the models sent in that
// frame (computed independently from the tone formula), the write addresses
// must run 0..N-1, writes must be exactly one frame (64*SCK_DIV cycles)
// apart, and ready must rise after the last write and clear on go_sck.
module i2s_capture_tb;
  import sl_pkg::*;
  localparam int NS  = 64;
  localparam int DIV = 8;
  logic clk = 0, rst_n = 0, go = 0;
  logic [3:0] sd;
  logic sck, ws, wrreq, ready;
  logic [$clog2(NS)-1:0] wr_addr;
  logic [SAMPLE_W-1:0] ram_in [8];
  int frame [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  i2s_capture #(.N_SD(4), .SCK_DIV(DIV), .N_SAMPLES(NS)) dut (
    .clk, .rst_n, .go_sck(go), .sd, .sck, .ws, .wrreq, .wr_addr, .ram_in, .ready);

  for (genvar s = 0; s < 4; s++) begin : g_mic
    i2s_mic_model #(.BIN(3.0 + s), .TAU_L(0.5 * s), .TAU_R(-1.25 * s), .AMP(6000000.0), .N(NS))
      u_mic (.sck, .ws, .sd(sd[s]), .frame(frame[s]));
  end

  function automatic logic [23:0] tone(input real bin, input int n, input real tau);
    real v;
    v = 6000000.0 * $sin(2.0 * 3.14159265358979 * bin * (real'(n) - tau) / real'(NS));
    return 24'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int nwrites = 0;
  longint last_write = -1, cyc = 0;
  always @(posedge clk) cyc++;

  // check each write
  always @(posedge clk) if (rst_n && wrreq) begin
    check(wr_addr == ($clog2(NS))'(nwrites % NS), "write address");
    if (last_write >= 0 && nwrites % NS != 0)
      check(cyc - last_write == 64 * DIV, "frame period");
    last_write = cyc;
    for (int s = 0; s < 4; s++) begin
      logic [23:0] l, r;
      l = tone(3.0 + s, frame[s] - 1, 0.5 * s);
      r = tone(3.0 + s, frame[s] - 1, -1.25 * s);
      check(ram_in[2*s]   == l[23:8], "left sample");
      check(ram_in[2*s+1] == r[23:8], "right sample");
    end
    nwrites++;
  end

  // WS must hold each level for 32 SCK periods (one slot)
  int sck_rises = 0, ws_changes = 0;
  logic ws_prev = 0;
  always @(posedge sck) begin
    sck_rises++;
    if (ws != ws_prev) begin
      if (ws_changes > 0) check(sck_rises == 32, "ws slot length");
      ws_changes++;
      sck_rises = 0;
    end
    ws_prev = ws;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (300) @(posedge clk);
    check(!ready && nwrites == 0, "idle before go");
    @(negedge clk) go = 1; @(negedge clk) go = 0;
    wait (ready);
    check(nwrites == NS, "one block written");
    repeat (2000) @(posedge clk);
    check(ready && nwrites == NS, "held in READ");
    @(negedge clk) go = 1; @(negedge clk) go = 0;
    @(posedge clk);
    check(!ready, "ready cleared by go");
    wait (ready);
    check(nwrites == 2 * NS, "second block written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * NS * 64 * DIV + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
