// fft_wrapper: one channel's FFT with its result RAM.
//
// Controller (states from the document): IDLE waits until the raw RAMs are
// ready; READ requests the N raw samples in order (rdreq, one per cycle) and
// streams them into the FFT as one packet: sink_valid follows rdreq by the
// one-cycle RAM latency, sink_sop marks sample 0, sink_eop sample N-1, as in
// the document's 1024-point packet counter. WRITE stores the FFT output
// stream in the FFT RAM; READY (fftdone high) holds the spectrum until go.
// go returns the controller to IDLE from any state and clears the FFT.
//
// The FFT RAM address generator keeps the document's VACANT/START states:
// VACANT holds address 0 and waits for the start of an output packet, START
// advances the address per output word. The document waits for source_eop
// because its vendor core streams without gaps; fft_core emits exactly one
// packet, so this design starts at source_sop. Because fft_core outputs in
// bit-reversed order, RAM address a holds bin bitrev(a).
//
// The FFT input is the upper FFT_IN_W bits of the 16-bit raw sample, imag 0.
// ram_q is the FFT RAM word at rd_addr_fft, one cycle after the address.
// Timing per block: N read cycles + (N/2)log2(N) compute + N write cycles.
module fft_wrapper
  import sl_pkg::*;
#(
  parameter int N = N_FFT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    go,          // restart (returns to IDLE)
  input  logic                    ready,       // raw RAMs hold a full block
  input  logic [FFT_IN_W-1:0]     data_in,     // raw sample, one cycle after rdreq
  input  logic [$clog2(N)-1:0]    rd_addr_fft, // FFT RAM read address
  output logic                    fftdone,
  output logic                    rdreq,
  output fft_word_t               ram_q
);
  localparam int AW = $clog2(N);
  typedef enum logic [1:0] {IDLE, READ, WRITE, READY} state_t;
  typedef enum logic {VACANT, START} wr_state_t;

  state_t    state;
  wr_state_t state_wr_addr;
  logic [AW:0]   rd_cnt;
  logic [AW-1:0] sink_cnt, wr_addr;
  logic          sink_valid, sink_sop, sink_eop;
  logic          src_valid, src_sop, src_eop, sink_ready;
  logic signed [FFT_OUT_W-1:0] src_re, src_im;
  fft_word_t     fft_ram [N];

  assign fftdone = (state == READY);
  assign rdreq   = (state == READ) && (rd_cnt < (AW+1)'(N));

  // control state machine and sink packet framing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      rd_cnt     <= '0;
      sink_cnt   <= '0;
      sink_valid <= 1'b0;
      sink_sop   <= 1'b0;
      sink_eop   <= 1'b0;
    end else if (go) begin
      state      <= IDLE;
      rd_cnt     <= '0;
      sink_valid <= 1'b0;
      sink_sop   <= 1'b0;
      sink_eop   <= 1'b0;
    end else begin
      sink_valid <= rdreq;
      sink_sop   <= rdreq && (rd_cnt == '0);
      sink_eop   <= rdreq && (rd_cnt == (AW+1)'(N - 1));
      sink_cnt   <= rd_cnt[AW-1:0];
      unique case (state)
        IDLE:  if (ready && sink_ready) begin
          state  <= READ;
          rd_cnt <= '0;
        end
        READ: begin
          rd_cnt <= rd_cnt + 1'b1;
          if (rd_cnt == (AW+1)'(N - 1)) state <= WRITE;
        end
        WRITE: if (src_valid && src_eop && state_wr_addr == START) state <= READY;
        READY: ;
        default: state <= IDLE;
      endcase
    end
  end

  fft_core #(.N(N)) u_fft (
    .clk, .rst_n, .clear(go),
    .sink_valid, .sink_sop, .sink_eop,
    .sink_real(data_in), .sink_imag('0), .sink_ready,
    .source_valid(src_valid), .source_sop(src_sop), .source_eop(src_eop),
    .source_real(src_re), .source_imag(src_im));

  // FFT RAM write address generator
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_addr       <= '0;
      state_wr_addr <= VACANT;
    end else if (go) begin
      wr_addr       <= '0;
      state_wr_addr <= VACANT;
    end else begin
      unique case (state_wr_addr)
        VACANT: begin
          wr_addr <= '0;
          if (src_valid && src_sop) begin
            wr_addr       <= AW'(1);
            state_wr_addr <= src_eop ? VACANT : START;
          end
        end
        START: if (src_valid) begin
          wr_addr <= wr_addr + 1'b1;
          if (src_eop) state_wr_addr <= VACANT;
        end
        default: state_wr_addr <= VACANT;
      endcase
    end
  end

  // FFT RAM: one write port, one synchronous read port
  always_ff @(posedge clk) begin
    if (src_valid && (src_sop || state_wr_addr == START))
      fft_ram[src_sop ? '0 : wr_addr] <= '{re: src_re, im: src_im};
    ram_q <= fft_ram[rd_addr_fft];
  end

  // the sink packet counter must match the request counter
  assert property (@(posedge clk) disable iff (!rst_n)
                   sink_valid |-> (sink_sop == (sink_cnt == '0)));
endmodule
