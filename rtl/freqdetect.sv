// freqdetect: finds the dominant frequency bin of one channel's spectrum.
//
// When fftdone rises, the block reads bins MIN_BIN .. N/2-1 of the FFT RAM,
// one per cycle at address bitrev(bin) (the RAM holds bit-reversed order),
// computes |X|^2 = re^2 + im^2 and keeps the bin whose squared magnitude is
// strictly larger than the running maximum (the first bin wins a tie).
// Bins below MIN_BIN (DC and the lowest frequencies) are skipped, as the
// document asks; the value of MIN_BIN and the restriction to the lower half
// of the spectrum (the input is real, so the upper half mirrors it) are this
// design's choices. The RAM read has one cycle latency.
//
// Timing: N/2 - MIN_BIN + 1 cycles from fftdone to detectdone. detectdone
// and maxbin stay valid until fftdone falls, which re-arms the block.
module freqdetect
  import sl_pkg::*;
#(
  parameter int N       = N_FFT,
  parameter int MIN_BIN = 4
) (
  input  logic                 clk,
  input  logic                 reset,      // active low, like the board key
  input  logic                 fftdone,
  input  fft_word_t            ramq,       // FFT RAM data, one cycle after ramaddr
  output logic [$clog2(N)-1:0] ramaddr,
  output logic                 detectdone,
  output logic [$clog2(N)-1:0] maxbin
);
  localparam int AW = $clog2(N);
  localparam int SQ_W = 2*FFT_OUT_W;
  typedef enum logic [1:0] {IDLE, SCAN, DONE} state_t;

  state_t          state;
  logic [AW-1:0]   bin, bin_d;      // bin addressed / bin whose data is on ramq
  logic            valid_d;
  logic [SQ_W:0]   cursqmag, maxsqmag;
  logic signed [SQ_W-1:0] re_sq, im_sq;

  function automatic logic [AW-1:0] rev(input logic [AW-1:0] a);
    for (int i = 0; i < AW; i++) rev[i] = a[AW-1-i];
  endfunction

  assign ramaddr    = rev(bin);
  assign detectdone = (state == DONE);

  realmult #(.AW(FFT_OUT_W), .BW(FFT_OUT_W)) u_re (.a(ramq.re), .b(ramq.re), .p(re_sq));
  realmult #(.AW(FFT_OUT_W), .BW(FFT_OUT_W)) u_im (.a(ramq.im), .b(ramq.im), .p(im_sq));
  assign cursqmag = (SQ_W+1)'(unsigned'(re_sq)) + (SQ_W+1)'(unsigned'(im_sq));

  always_ff @(posedge clk or negedge reset) begin
    if (!reset) begin
      state    <= IDLE;
      bin      <= AW'(MIN_BIN);
      bin_d    <= '0;
      valid_d  <= 1'b0;
      maxsqmag <= '0;
      maxbin   <= '0;
    end else begin
      valid_d <= 1'b0;
      unique case (state)
        IDLE: begin
          bin <= AW'(MIN_BIN);
          if (fftdone) begin
            state    <= SCAN;
            maxsqmag <= '0;
            maxbin   <= AW'(MIN_BIN);
            valid_d  <= 1'b1;
            bin_d    <= AW'(MIN_BIN);
            bin      <= AW'(MIN_BIN + 1);
          end
        end
        SCAN: begin
          if (valid_d && cursqmag > maxsqmag) begin
            maxsqmag <= cursqmag;
            maxbin   <= bin_d;
          end
          if (bin_d == AW'(N/2 - 1)) begin
            state <= DONE;
          end else begin
            valid_d <= 1'b1;
            bin_d   <= bin;
            bin     <= bin + 1'b1;
          end
        end
        DONE: if (!fftdone) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
