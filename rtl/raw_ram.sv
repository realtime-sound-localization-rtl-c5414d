// raw_ram: raw sample buffer of one microphone (DEPTH x WIDTH).
//
// Written by the I2S capture block at an explicit address (wrreq, wr_addr,
// data). Read like a FIFO by the FFT wrapper: every cycle with rdreq high
// returns the word at the internal read pointer on q in the next cycle and
// advances the pointer; clear returns the pointer to address 0. The document
// names only the read request and the "ready" condition of these RAMs; the
// read pointer and its clear are this design's choice. Memory content is
// not reset.
module raw_ram #(
  parameter int DEPTH = 1024,
  parameter int WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wrreq,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         data,
  input  logic                     clear,
  input  logic                     rdreq,
  output logic [WIDTH-1:0]         q
);
  logic [WIDTH-1:0]         mem [DEPTH];
  logic [$clog2(DEPTH)-1:0] rd_ptr;

  always_ff @(posedge clk) begin
    if (wrreq) mem[wr_addr] <= data;
    if (rdreq) q <= mem[rd_ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rd_ptr <= '0;
    else if (clear) rd_ptr <= '0;
    else if (rdreq) rd_ptr <= rd_ptr + 1'b1;
  end
endmodule
