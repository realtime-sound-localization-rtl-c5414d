// raw_ram_tb: fills the buffer at scattered addresses, then reads it back
// in order with gaps in rdreq; q must follow each request by one cycle and
// hold while rdreq is low; clear must restart the read at address 0.
module raw_ram_tb;
  localparam int D = 64, W = 16;
  logic clk = 0, rst_n = 0, wrreq = 0, clear = 0, rdreq = 0;
  logic [$clog2(D)-1:0] wr_addr = '0;
  logic [W-1:0] data = '0, q;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  raw_ram #(.DEPTH(D), .WIDTH(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // write in a permuted order: address (i*37) mod 64
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      wrreq = 1; wr_addr = 6'((i * 37) % D); data = 16'($urandom);
      model[(i * 37) % D] = data;
    end
    @(negedge clk) wrreq = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < D; i++) begin
        @(negedge clk) rdreq = 1;
        @(negedge clk) rdreq = 0;
        check(q == model[i], "read data");
        if (i % 5 == 0) begin
          @(negedge clk);
          check(q == model[i], "hold without rdreq");
        end
      end
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
    end
    // clear in the middle of a block restarts at address 0
    for (int i = 0; i < 5; i++) begin
      @(negedge clk) rdreq = 1;
      @(negedge clk) rdreq = 0;
    end
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    // back-to-back reads after clear
    @(negedge clk) rdreq = 1;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      check(q == model[i], "streaming read");
    end
    rdreq = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
