// sound_localizer: dual-axis realtime sound source localization.
//
// Eight I2S MEMS microphones on four data lines (two per line, left and
// right slot) form two linear arrays of four, one per axis: SD lines 0-1
// feed axis 0, lines 2-3 axis 1. i2s_capture clocks all microphones and
// writes 1024-sample blocks into eight raw_ram buffers; each
// axis_localizer then transforms its four channels, finds the dominant
// frequency and scans the directions for the angle of arrival, shown on
// three 7-segment digits per axis.
//
// The system runs on its own: one cycle after reset it starts the first
// block, and when both axes have finished it starts the next (the document's
// single-axis system duplicated for two axes, updated continuously). A
// block takes 1024 frames of 64 SCK periods (SCK_DIV clk cycles each) to
// capture, then about 7.2k cycles of FFT and 0.9k of detection and scan.
// Microphone order in an axis: left then right of the lower SD line, then
// left and right of the upper one.
module sound_localizer
  import sl_pkg::*;
#(
  parameter int N       = N_FFT,
  parameter int SCK_DIV = 16
) (
  input  logic               clk,          // 50 MHz
  input  logic               rst_n,
  input  logic [3:0]         sd,           // I2S data lines
  output logic               sck,
  output logic               ws,
  output logic               ready,        // raw RAMs hold a full block
  output logic [1:0]         done,         // per axis: estimate valid
  output logic signed [7:0]  doa   [2],    // per axis, degrees
  output logic [$clog2(N)-1:0] maxbin [2], // per axis, dominant FFT bin
  output logic [6:0]         disp  [2][3]  // per axis: {units, tens, sign}
);
  localparam int AW = $clog2(N);

  logic                go, started, all_done_q;
  logic                wrreq;
  logic [AW-1:0]       wr_addr;
  logic [SAMPLE_W-1:0] ram_in [8];
  logic [SAMPLE_W-1:0] raw_q  [8];
  logic [7:0]          rdreq;

  // restart control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started    <= 1'b0;
      all_done_q <= 1'b0;
    end else begin
      started    <= 1'b1;
      all_done_q <= &done;
    end
  end
  assign go = !started || (&done && !all_done_q);

  i2s_capture #(.N_SD(4), .SCK_DIV(SCK_DIV), .N_SAMPLES(N)) u_i2s (
    .clk, .rst_n, .go_sck(go), .sd, .sck, .ws,
    .wrreq, .wr_addr, .ram_in, .ready);

  for (genvar c = 0; c < 8; c++) begin : g_raw
    raw_ram #(.DEPTH(N), .WIDTH(SAMPLE_W)) u_raw (
      .clk, .rst_n, .wrreq, .wr_addr, .data(ram_in[c]),
      .clear(go), .rdreq(rdreq[c]), .q(raw_q[c]));
  end

  for (genvar a = 0; a < 2; a++) begin : g_axis
    logic [SAMPLE_W-1:0] q_axis [N_MIC];
    for (genvar m = 0; m < N_MIC; m++) begin : g_m
      assign q_axis[m] = raw_q[4*a + m];
    end
    axis_localizer #(.N(N)) u_axis (
      .clk, .rst_n, .go, .ready,
      .raw_q(q_axis), .rdreq(rdreq[4*a +: 4]),
      .fftdone(), .detectdone(), .maxbin(maxbin[a]),
      .done(done[a]), .doa(doa[a]), .bnum(),
      .disp2(disp[a][2]), .disp1(disp[a][1]), .disp0(disp[a][0]));
  end
endmodule
