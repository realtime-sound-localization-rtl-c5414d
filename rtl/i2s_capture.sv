// i2s_capture: I2S master and raw-sample writer for N_SD data lines.
//
// The block drives the serial clock SCK (clk / SCK_DIV) and the word select
// WS to all microphones. Each SD line is shared by a left (WS low) and a
// right (WS high) microphone. A frame is 64 SCK periods counted by clk_cnt:
// the 24 bits of the left word are shifted in, MSB first, on the SCK rising
// edges of periods 1..24, those of the right word in periods 33..56, as in
// the document's capture code. In period 57 the upper 16 bits of every word
// are written to the raw RAMs at wr_addr (one-cycle wrreq pulse); channel
// 2*s holds the left and channel 2*s+1 the right microphone of SD line s.
//
// State machine (from the document): IDLE waits for go_sck; WRITE stores
// N_SAMPLES frames at addresses 0..N_SAMPLES-1; READ raises ready (the RAMs
// hold a full block) until go_sck starts the next block. Own choices: SCK is
// free running from reset so the microphones stay awake; a block starts with
// the first whole frame after go_sck (a frame that began before go_sck is not
// stored); SD is sampled through a two-flop synchronizer, which delays the
// sample by two clk cycles, well inside half an SCK period for SCK_DIV >= 8.
module i2s_capture
  import sl_pkg::*;
#(
  parameter int N_SD      = 4,
  parameter int SCK_DIV   = 16,      // clk cycles per SCK period (even)
  parameter int N_SAMPLES = N_FFT
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          go_sck,   // start a new block
  input  logic [N_SD-1:0]               sd,
  output logic                          sck,
  output logic                          ws,
  output logic                          wrreq,
  output logic [$clog2(N_SAMPLES)-1:0]  wr_addr,
  output logic [SAMPLE_W-1:0]           ram_in [2*N_SD],
  output logic                          ready
);
  localparam int AW = $clog2(N_SAMPLES);
  typedef enum logic [1:0] {IDLE, WRITE, READ} state_t;

  state_t                        state;
  logic [$clog2(SCK_DIV)-1:0]    phase;
  logic [5:0]                    clk_cnt;
  logic                          rise, period_end;
  logic [N_SD-1:0]               sd_s1, sd_s2;
  logic [I2S_WORD_W-1:0]         left  [N_SD];
  logic [I2S_WORD_W-1:0]         right [N_SD];
  logic                          frame_ok;   // current frame started in WRITE
  logic                          first;      // next write goes to address 0

  assign rise       = (phase == ($clog2(SCK_DIV))'(SCK_DIV/2 - 1));
  assign period_end = (phase == ($clog2(SCK_DIV))'(SCK_DIV - 1));
  assign ready      = (state == READ);

  // SCK and WS generation
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= '0;
      clk_cnt <= '0;
      sck     <= 1'b0;
      ws      <= 1'b0;
      sd_s1   <= '0;
      sd_s2   <= '0;
    end else begin
      sd_s1 <= sd;
      sd_s2 <= sd_s1;
      phase <= period_end ? '0 : phase + 1'b1;
      if (rise) sck <= 1'b1;
      if (period_end) begin
        sck     <= 1'b0;
        clk_cnt <= clk_cnt + 6'd1;
        ws      <= ((clk_cnt + 6'd1) >= 6'd32);
      end
    end
  end

  // Shift registers: sample SD on the SCK rising edge. The synchronizer
  // delay is absorbed by sampling two clk cycles after the edge.
  logic sample_now;
  logic [1:0] rise_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rise_d <= '0;
    else        rise_d <= {rise_d[0], rise};
  end
  assign sample_now = rise_d[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_SD; s++) begin
        left[s]  <= '0;
        right[s] <= '0;
      end
    end else if (sample_now) begin
      if (clk_cnt > 6'd0 && clk_cnt < 6'd25) begin
        for (int s = 0; s < N_SD; s++) left[s] <= {left[s][I2S_WORD_W-2:0], sd_s2[s]};
      end else if (clk_cnt > 6'd32 && clk_cnt < 6'd57) begin
        for (int s = 0; s < N_SD; s++) right[s] <= {right[s][I2S_WORD_W-2:0], sd_s2[s]};
      end
    end
  end

  // Block write state machine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      wrreq    <= 1'b0;
      wr_addr  <= '0;
      frame_ok <= 1'b0;
      first    <= 1'b1;
      for (int c = 0; c < 2*N_SD; c++) ram_in[c] <= '0;
    end else begin
      wrreq <= 1'b0;
      // a frame counts once it starts (period 0) while writing
      if (period_end && clk_cnt == 6'd63) frame_ok <= (state == WRITE) && !go_sck;
      unique case (state)
        IDLE: if (go_sck) begin
          state    <= WRITE;
          first    <= 1'b1;
          frame_ok <= 1'b0;
        end
        WRITE: begin
          if (go_sck) begin
            first    <= 1'b1;
            frame_ok <= 1'b0;
          end else if (frame_ok && clk_cnt == 6'd57 && phase == '0) begin
            for (int s = 0; s < N_SD; s++) begin
              ram_in[2*s]   <= left[s][I2S_WORD_W-1 -: SAMPLE_W];   // drop low 8 bits
              ram_in[2*s+1] <= right[s][I2S_WORD_W-1 -: SAMPLE_W];
            end
            wrreq   <= 1'b1;
            wr_addr <= first ? '0 : wr_addr + 1'b1;
            first   <= 1'b0;
          end else if (!first && clk_cnt == 6'd58 && phase == '0 &&
                       wr_addr == AW'(N_SAMPLES - 1)) begin
            state <= READ;
          end
        end
        READ: if (go_sck) begin
          state    <= WRITE;
          first    <= 1'b1;
          frame_ok <= 1'b0;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
