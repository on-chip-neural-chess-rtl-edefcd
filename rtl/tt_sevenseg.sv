// Eight-digit seven-segment view of one board row.
//
// BTNU/BTND pulses (up, down) move the viewed row between 0 and 7. Each digit shows
// the piece on one square of that row as a number: 0 empty, 1 pawn, 2 knight,
// 3 bishop, 4 rook, 5 queen, 6 king, and the decimal point lit for a black piece.
// The digits are time-multiplexed: every REFRESH cycles the next anode (active low)
// is selected; segments are active low, seg[6:0] = {g,f,e,d,c,b,a}. Digit 7 (leftmost)
// shows column 0. One number per piece and the scroll buttons follow the description;
// the digit code and timing are this design's choices.
module tt_sevenseg
  import onechan_pkg::*;
#(
  parameter int REFRESH = 100000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  piece_t     board [64],
  input  logic       up,
  input  logic       down,
  output logic [2:0] row,
  output logic [7:0] an_n,
  output logic [6:0] seg_n,
  output logic       dp_n
);

  logic [$clog2(REFRESH+1)-1:0] cnt;
  logic [2:0] digit;
  piece_t     pc;
  logic [3:0] code;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row   <= '0;
      cnt   <= '0;
      digit <= '0;
    end else begin
      if (up && row != 3'd7)   row <= row + 1'b1;
      else if (down && row != 3'd0) row <= row - 1'b1;
      if (int'(cnt) == REFRESH - 1) begin
        cnt   <= '0;
        digit <= digit + 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_comb begin
    pc   = board[{row, 3'd7 - digit}];
    code = 4'd0;
    for (int t = 0; t < 6; t++) if (pc[t]) code = 4'(t + 1);
    an_n = ~(8'd1 << digit);
    dp_n = ~pc[P_BLACK];
    case (code)
      4'd0:    seg_n = 7'b1000000;
      4'd1:    seg_n = 7'b1111001;
      4'd2:    seg_n = 7'b0100100;
      4'd3:    seg_n = 7'b0110000;
      4'd4:    seg_n = 7'b0011001;
      4'd5:    seg_n = 7'b0010010;
      4'd6:    seg_n = 7'b0000010;
      default: seg_n = 7'b1111111;
    endcase
  end

endmodule
