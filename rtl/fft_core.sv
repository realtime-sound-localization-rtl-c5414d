// fft_core: N-point radix-2 FFT with a packet stream interface.
//
// Takes one packet of N complex samples (sink_valid, with sink_sop on the
// first and sink_eop on the last; sink_ready high while a packet can be
// accepted), transforms it in place, and returns the N results as one
// packet (source_valid, source_sop, source_eop). The document uses a vendor
// streaming FFT core with this kind of interface; this block is a simple
// replacement of this design's own making, not a copy of that core.
//
// Algorithm: decimation in frequency, in place, one butterfly per cycle:
//   A' = (A + B) / 2,   B' = ((A - B) * W^m) / 2,   W^m = exp(-j*2*pi*m/N)
// over log2(N) stages of N/2 butterflies. Natural-order input therefore
// gives bit-reversed output order: output number a of the packet is bin
// bitrev(a). The 1/2 per stage makes the result X[k]/N, so it cannot
// overflow; the data path keeps GUARD extra fraction bits.
//
// Timing: N cycles to load, (N/2)*log2(N) cycles to compute (5120 for
// N = 1024), then N cycles of output at one word per cycle. clear aborts
// any packet and returns to loading. Twiddles come from the full-turn
// trig_rom (index m * N_FFT / N).
module fft_core
  import sl_pkg::*;
#(
  parameter int N     = N_FFT,
  parameter int IN_W  = FFT_IN_W,
  parameter int OUT_W = FFT_OUT_W,
  parameter int GUARD = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    sink_valid,
  input  logic                    sink_sop,
  input  logic                    sink_eop,
  input  logic signed [IN_W-1:0]  sink_real,
  input  logic signed [IN_W-1:0]  sink_imag,
  output logic                    sink_ready,
  output logic                    source_valid,
  output logic                    source_sop,
  output logic                    source_eop,
  output logic signed [OUT_W-1:0] source_real,
  output logic signed [OUT_W-1:0] source_imag
);
  localparam int LOGN = $clog2(N);
  localparam int IW   = IN_W + GUARD;           // internal word
  localparam int TSH  = $clog2(N_FFT) - LOGN;   // twiddle index scaling

  typedef enum logic [1:0] {LOAD, COMPUTE, UNLOAD} state_t;
  state_t state;

  logic signed [IW-1:0] mem_re [N];
  logic signed [IW-1:0] mem_im [N];

  logic [LOGN-1:0]         cnt;      // load / unload index, butterfly index
  logic [$clog2(LOGN)-1:0] stage;
  logic                    loading;  // a packet has started (sop seen)

  // butterfly addressing for the current stage
  logic [LOGN-1:0] half, a_idx, b_idx, tw_m;
  logic [LOGN-2:0] bf;
  always_comb begin
    bf    = cnt[LOGN-2:0];
    half  = LOGN'(1) << (LOGN - 1 - int'(stage));
    a_idx = ((LOGN'(bf) & ~(half - 1'b1)) << 1) | (LOGN'(bf) & (half - 1'b1));
    b_idx = a_idx | half;
    tw_m  = (LOGN'(bf) & (half - 1'b1)) << stage;
  end

  logic signed [TRIG_W-1:0] tw_cos, tw_sin;
  trig_rom u_tw (.addr(LOG2_N'(tw_m) << TSH), .cos_o(tw_cos), .sin_o(tw_sin));

  logic signed [IW:0]          sum_re, sum_im, dif_re, dif_im;
  logic signed [IW+TRIG_W+1:0] prod_re, prod_im;
  logic signed [IW-1:0]        new_a_re, new_a_im, new_b_re, new_b_im;
  always_comb begin
    sum_re = (IW+1)'(mem_re[a_idx]) + (IW+1)'(mem_re[b_idx]);
    sum_im = (IW+1)'(mem_im[a_idx]) + (IW+1)'(mem_im[b_idx]);
    dif_re = (IW+1)'(mem_re[a_idx]) - (IW+1)'(mem_re[b_idx]);
    dif_im = (IW+1)'(mem_im[a_idx]) - (IW+1)'(mem_im[b_idx]);
  end
  // (dif) * (cos - j sin)
  compmult #(.AW(IW+1), .BW(TRIG_W)) u_bf_mul (
    .a_re(dif_re), .a_im(dif_im), .b_re(tw_cos), .b_im(-tw_sin),
    .p_re(prod_re), .p_im(prod_im));
  always_comb begin
    new_a_re = IW'(sum_re >>> 1);
    new_a_im = IW'(sum_im >>> 1);
    // the table's full scale is 2047: scale by (1 + 2^-11)/4096 ~ 1/(2*2047)
    new_b_re = IW'((prod_re + (prod_re >>> (TRIG_W - 1))) >>> TRIG_W);
    new_b_im = IW'((prod_im + (prod_im >>> (TRIG_W - 1))) >>> TRIG_W);
  end

  // write data for LOAD
  logic signed [IW-1:0] in_re, in_im;
  assign in_re = IW'(sink_real) <<< GUARD;
  assign in_im = IW'(sink_imag) <<< GUARD;

  assign sink_ready = (state == LOAD);

  always_ff @(posedge clk) begin
    if (state == LOAD && sink_valid && (loading || sink_sop)) begin
      mem_re[sink_sop ? '0 : cnt] <= in_re;
      mem_im[sink_sop ? '0 : cnt] <= in_im;
    end else if (state == COMPUTE) begin
      mem_re[a_idx] <= new_a_re;
      mem_im[a_idx] <= new_a_im;
      mem_re[b_idx] <= new_b_re;
      mem_im[b_idx] <= new_b_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= LOAD;
      cnt          <= '0;
      stage        <= '0;
      loading      <= 1'b0;
      source_valid <= 1'b0;
      source_sop   <= 1'b0;
      source_eop   <= 1'b0;
      source_real  <= '0;
      source_imag  <= '0;
    end else if (clear) begin
      state        <= LOAD;
      cnt          <= '0;
      stage        <= '0;
      loading      <= 1'b0;
      source_valid <= 1'b0;
      source_sop   <= 1'b0;
      source_eop   <= 1'b0;
    end else begin
      source_valid <= 1'b0;
      source_sop   <= 1'b0;
      source_eop   <= 1'b0;
      unique case (state)
        LOAD: if (sink_valid && (loading || sink_sop)) begin
          loading <= 1'b1;
          cnt     <= (sink_sop ? '0 : cnt) + 1'b1;
          if (sink_eop || (!sink_sop && cnt == LOGN'(N - 1))) begin
            state   <= COMPUTE;
            loading <= 1'b0;
            cnt     <= '0;
            stage   <= '0;
          end
        end
        COMPUTE: begin
          if (cnt == LOGN'(N/2 - 1)) begin
            cnt <= '0;
            if (stage == ($clog2(LOGN))'(LOGN - 1)) state <= UNLOAD;
            else                                     stage <= stage + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        UNLOAD: begin
          source_valid <= 1'b1;
          source_sop   <= (cnt == '0);
          source_eop   <= (cnt == LOGN'(N - 1));
          source_real  <= OUT_W'(mem_re[cnt] >>> GUARD);
          source_imag  <= OUT_W'(mem_im[cnt] >>> GUARD);
          cnt          <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) state <= LOAD;
        end
        default: state <= LOAD;
      endcase
    end
  end
endmodule
