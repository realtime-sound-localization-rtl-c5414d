// axis_localizer: direction finding along one axis of N_MIC microphones.
//
// Chain (per the document's single-axis block diagram): one fft_wrapper per
// microphone turns a block of raw samples into a spectrum; freqdetect finds
// the dominant bin in microphone 0's spectrum; weightblock scans the
// directions at that bin over all four spectra; angdisplay shows the result.
// The four FFT RAMs share one read address: freqdetect's scan address until
// detectdone, then the weight block's address bitrev(maxbin).
//
// go restarts the chain (all FFT wrappers return to IDLE; freqdetect and the
// weight block re-arm when their start levels fall). ready means the raw
// RAMs hold a block; raw_q[i] is microphone i's raw RAM output, read with
// rdreq[i]. done rises when doa holds a new estimate; it stays high until
// the next go. Microphone i's FFT takes the upper 14 bits of its 16-bit
// raw sample.
module axis_localizer
  import sl_pkg::*;
#(
  parameter int N = N_FFT
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   go,
  input  logic                   ready,
  input  logic [SAMPLE_W-1:0]    raw_q  [N_MIC],
  output logic [N_MIC-1:0]       rdreq,
  output logic                   fftdone,
  output logic                   detectdone,
  output logic [$clog2(N)-1:0]   maxbin,
  output logic                   done,
  output logic signed [7:0]      doa,
  output logic [$clog2(N_DIR)-1:0] bnum,
  output logic [6:0]             disp2,
  output logic [6:0]             disp1,
  output logic [6:0]             disp0
);
  localparam int AW = $clog2(N);

  fft_word_t       ram_q [N_MIC];
  logic [N_MIC-1:0] fft_done;
  logic [AW-1:0]   fd_addr, wb_addr, rd_addr;

  for (genvar i = 0; i < N_MIC; i++) begin : g_fft
    fft_wrapper #(.N(N)) u_fftw (
      .clk, .rst_n, .go, .ready,
      .data_in(raw_q[i][SAMPLE_W-1 -: FFT_IN_W]),
      .rd_addr_fft(rd_addr),
      .fftdone(fft_done[i]),
      .rdreq(rdreq[i]),
      .ram_q(ram_q[i]));
  end

  // all channels run in lock step; wait for every one of them
  assign fftdone = &fft_done;
  assign rd_addr = detectdone ? wb_addr : fd_addr;

  freqdetect #(.N(N)) u_fd (
    .clk, .reset(rst_n), .fftdone,
    .ramq(ram_q[0]), .ramaddr(fd_addr), .detectdone, .maxbin);

  weightblock #(.N(N)) u_wb (
    .clk, .reset(rst_n), .detectdone, .maxbin, .ramq(ram_q),
    .ramaddr(wb_addr), .done, .doa, .bnum);

  angdisplay u_disp (
    .clk, .reset(rst_n), .done, .doa, .disp2, .disp1, .disp0);
endmodule
