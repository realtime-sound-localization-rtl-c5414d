// angdisplay: shows the estimated direction on three 7-segment digits.
//
// disp2 is the sign digit ('-' for negative angles, blank otherwise), disp1
// the tens and disp0 the units of |doa| in degrees; a leading zero in the
// tens digit is blanked. Segments are active low in the order {g,f,e,d,c,b,a}
// (e.g. '7' = 1111000, '5' = 0010010, '-' = 0111111), the encoding seen in
// the document's simulation. Until the first estimate all three digits show
// '-'. The angle is latched while done is high, so the display keeps the
// last estimate while the next one is being computed. Outputs are
// registered: one cycle after done.
module angdisplay (
  input  logic              clk,
  input  logic              reset,     // active low
  input  logic              done,
  input  logic signed [7:0] doa,       // degrees, -99..99
  output logic [6:0]        disp2,
  output logic [6:0]        disp1,
  output logic [6:0]        disp0
);
  localparam logic [6:0] SEG_DASH  = 7'b0111111;
  localparam logic [6:0] SEG_BLANK = 7'b1111111;

  function automatic logic [6:0] seg(input logic [3:0] d);
    unique case (d)
      4'd0: seg = 7'b1000000;
      4'd1: seg = 7'b1111001;
      4'd2: seg = 7'b0100100;
      4'd3: seg = 7'b0110000;
      4'd4: seg = 7'b0011001;
      4'd5: seg = 7'b0010010;
      4'd6: seg = 7'b0000010;
      4'd7: seg = 7'b1111000;
      4'd8: seg = 7'b0000000;
      4'd9: seg = 7'b0010000;
      default: seg = SEG_BLANK;
    endcase
  endfunction

  logic [6:0] mag;
  logic [3:0] tens, units;
  always_comb begin
    mag   = doa[7] ? 7'(-doa) : 7'(doa);
    tens  = 4'(mag / 7'd10);
    units = 4'(mag % 7'd10);
  end

  always_ff @(posedge clk or negedge reset) begin
    if (!reset) begin
      disp2 <= SEG_DASH;
      disp1 <= SEG_DASH;
      disp0 <= SEG_DASH;
    end else if (done) begin
      disp2 <= doa[7] ? SEG_DASH : SEG_BLANK;
      disp1 <= (tens == 4'd0) ? SEG_BLANK : seg(tens);
      disp0 <= seg(units);
    end
  end
endmodule
