// i2s_mic_model: behavioural model of two I2S MEMS microphones sharing one
// data line (left slot while WS is low, right slot while WS is high).
//
// Each microphone hears a tone of BIN cycles per N samples and amplitude AMP
// (in units of the 24-bit word), delayed by TAU_L / TAU_R samples:
//     word(n) = round(AMP * sin(2*pi*BIN*(n - tau)/N))
// A word is driven MSB first, one bit per SCK period, starting in the second
// SCK period after the WS edge, changing on the SCK falling edge (standard
// I2S). After the 24 bits the line is driven low. frame counts the frames
// whose left word has been started; sample n is sent in frame n+1's count.
module i2s_mic_model #(
  parameter real BIN   = 40.0,
  parameter real TAU_L = 0.0,
  parameter real TAU_R = 0.0,
  parameter real AMP   = 4194304.0,
  parameter int  N     = 1024
) (
  input  logic sck,
  input  logic ws,
  output logic sd,
  output int   frame
);
  localparam real PI = 3.14159265358979;
  logic [23:0] word_l, word_r;
  logic        ws_q;
  int          cnt;

  function automatic logic [23:0] tone(input int n, input real tau);
    real v;
    v = AMP * $sin(2.0 * PI * BIN * (real'(n) - tau) / real'(N));
    return 24'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
  endfunction

  initial begin
    sd = 1'b0; ws_q = 1'b0; cnt = 0; frame = 0;
    word_l = tone(0, TAU_L); word_r = tone(0, TAU_R);
  end

  always @(negedge sck) begin
    if (ws != ws_q) begin
      cnt = 0;
      if (!ws) begin
        word_l = tone(frame, TAU_L);
        word_r = tone(frame, TAU_R);
        frame  = frame + 1;
      end
    end else begin
      cnt = cnt + 1;
    end
    ws_q = ws;
    if (cnt >= 1 && cnt <= 24) sd = ws ? word_r[24-cnt] : word_l[24-cnt];
    else                       sd = 1'b0;
  end
endmodule
