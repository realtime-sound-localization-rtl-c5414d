// weightblock: Bartlett (delay-and-sum) direction scan at one frequency bin.
//
// For every direction j of the grid the block forms the array output
//     Y_j = sum_{i=0..N_MIC-1} X_i * D_ij ,   D_ij = exp(+j*2*pi*k*tau_ij/N)
// where X_i is bin k (= maxbin from frequency detection) of microphone i's
// FFT and tau_ij the steering delay from delay_rom, and keeps the direction
// with the largest |Y_j|^2 as the DOA, as the document describes. The phase
// index k*tau_ij (taken modulo N) selects cos/sin from trig_rom; the complex
// products use compmult and the squares realmult.
//
// Sequence: IDLE waits for detectdone; MEMREAD/LATCH read X_0..X_3 from the
// four FFT RAMs at address bitrev(maxbin) (ramaddr); then for each direction
// bnum, ROMREAD/ACCUM spend two cycles per microphone (ROM latency, then
// accumulate) and MAGNITUDE compares |Y|^2 with the best so far (strictly
// larger wins, so the first of equal directions is kept). COMPLETE raises
// done and holds doa until detectdone falls. Latency: 3 + N_DIR*(2*N_MIC+1)
// cycles (336 for 37 directions and 4 microphones).
module weightblock
  import sl_pkg::*;
#(
  parameter int N = N_FFT
) (
  input  logic                          clk,
  input  logic                          reset,      // active low
  input  logic                          detectdone,
  input  logic [$clog2(N)-1:0]          maxbin,
  input  fft_word_t                     ramq [N_MIC],
  output logic [$clog2(N)-1:0]          ramaddr,
  output logic                          done,
  output logic signed [7:0]             doa,        // degrees
  output logic [$clog2(N_DIR)-1:0]      bnum
);
  localparam int AW    = $clog2(N);
  localparam int PW    = FFT_OUT_W + TRIG_W + 1;     // one product
  localparam int ACC_W = PW + $clog2(N_MIC);
  localparam int Y_W   = ACC_W - (TRIG_W - 1);
  localparam int MAG_W = 2*Y_W + 1;

  typedef enum logic [2:0] {IDLE, MEMREAD, LATCH, ROMREAD, ACCUM, MAGNITUDE, COMPLETE} state_t;
  state_t state;

  fft_word_t                       x [N_MIC];
  logic [$clog2(N_MIC)-1:0]        mic;
  logic signed [ACC_W-1:0]         acc_re, acc_im;
  logic [MAG_W-1:0]                best;
  logic signed [DELAY_W-1:0]       tau;
  logic signed [AW+DELAY_W:0]      phase_full;
  logic [LOG2_N-1:0]               phase;
  logic signed [TRIG_W-1:0]        d_cos, d_sin;
  logic signed [PW-1:0]            p_re, p_im;
  logic signed [Y_W-1:0]           y_re, y_im;
  logic signed [2*Y_W-1:0]         y_re_sq, y_im_sq;
  logic [MAG_W-1:0]                mag;

  function automatic logic [AW-1:0] rev(input logic [AW-1:0] a);
    for (int i = 0; i < AW; i++) rev[i] = a[AW-1-i];
  endfunction
  assign ramaddr = rev(maxbin);
  assign done    = (state == COMPLETE);

  delay_rom u_rom (
    .clk,
    .addr(($clog2(N_DIR*N_MIC))'(bnum) * ($clog2(N_DIR*N_MIC))'(N_MIC)
          + ($clog2(N_DIR*N_MIC))'(mic)),
    .q(tau));

  // phase index k*tau in 1/N turns (tau is Q7.8); N-point bins map onto the
  // N_FFT-entry table
  realmult #(.AW(AW+1), .BW(DELAY_W)) u_ph (
    .a(signed'({1'b0, maxbin})), .b(tau), .p(phase_full));
  assign phase = LOG2_N'((phase_full >>> DELAY_FRAC) << (LOG2_N - AW));

  trig_rom u_trig (.addr(phase), .cos_o(d_cos), .sin_o(d_sin));

  compmult #(.AW(FFT_OUT_W), .BW(TRIG_W)) u_cm (
    .a_re(x[mic].re), .a_im(x[mic].im), .b_re(d_cos), .b_im(d_sin),
    .p_re(p_re), .p_im(p_im));

  assign y_re = Y_W'(acc_re >>> (TRIG_W - 1));
  assign y_im = Y_W'(acc_im >>> (TRIG_W - 1));
  realmult #(.AW(Y_W), .BW(Y_W)) u_sq_re (.a(y_re), .b(y_re), .p(y_re_sq));
  realmult #(.AW(Y_W), .BW(Y_W)) u_sq_im (.a(y_im), .b(y_im), .p(y_im_sq));
  assign mag = MAG_W'(unsigned'(y_re_sq)) + MAG_W'(unsigned'(y_im_sq));

  always_ff @(posedge clk or negedge reset) begin
    if (!reset) begin
      state  <= IDLE;
      mic    <= '0;
      bnum   <= '0;
      acc_re <= '0;
      acc_im <= '0;
      best   <= '0;
      doa    <= 8'(DIR_MIN_DEG);
      for (int i = 0; i < N_MIC; i++) x[i] <= '0;
    end else begin
      unique case (state)
        IDLE: if (detectdone) state <= MEMREAD;
        MEMREAD: state <= LATCH;          // FFT RAM read latency
        LATCH: begin
          for (int i = 0; i < N_MIC; i++) x[i] <= ramq[i];
          bnum   <= '0;
          mic    <= '0;
          acc_re <= '0;
          acc_im <= '0;
          best   <= '0;
          doa    <= 8'(DIR_MIN_DEG);
          state  <= ROMREAD;
        end
        ROMREAD: state <= ACCUM;          // delay ROM latency
        ACCUM: begin
          acc_re <= acc_re + ACC_W'(p_re);
          acc_im <= acc_im + ACC_W'(p_im);
          if (mic == ($clog2(N_MIC))'(N_MIC - 1)) begin
            mic   <= '0;
            state <= MAGNITUDE;
          end else begin
            mic   <= mic + 1'b1;
            state <= ROMREAD;
          end
        end
        MAGNITUDE: begin
          if (bnum == '0 || mag > best) begin
            best <= mag;
            doa  <= 8'(DIR_MIN_DEG + DIR_STEP_DEG * int'(bnum));
          end
          acc_re <= '0;
          acc_im <= '0;
          if (bnum == ($clog2(N_DIR))'(N_DIR - 1)) begin
            state <= COMPLETE;
          end else begin
            bnum  <= bnum + 1'b1;
            state <= ROMREAD;
          end
        end
        COMPLETE: if (!detectdone) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
