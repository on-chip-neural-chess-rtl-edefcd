// End-to-end test of the analyzer with every parameter at its default (search depth
// 3, full button debounce): the players strip the board with unchecked moves down to
// king, rook and pawn per side (taking one move back and replaying it on the way), then a search runs
// and the LED move and root value are compared with a software negamax.
`define TOP_INST onechan_top
module tb_onechan_full;
  localparam int DEPTH      = 3;
  localparam int DEBOUNCE   = 100000;
  localparam longint MAX_CYCLES = 64'd400_000_000;
  localparam int N_SETUP    = 28;
  onechan_pkg::move_t setup_mv [N_SETUP] = '{
    '{6'd0, 6'd1},   '{6'd56, 6'd57}, '{6'd1, 6'd2},   '{6'd0, 6'd0},
    '{6'd1, 6'd2},   '{6'd57, 6'd58},
    '{6'd2, 6'd5},   '{6'd58, 6'd59}, '{6'd5, 6'd6},   '{6'd59, 6'd61},
    '{6'd6, 6'd7},   '{6'd61, 6'd63}, '{6'd7, 6'd8},   '{6'd63, 6'd48},
    '{6'd8, 6'd9},   '{6'd48, 6'd49}, '{6'd9, 6'd10},  '{6'd49, 6'd50},
    '{6'd10, 6'd11}, '{6'd50, 6'd52}, '{6'd11, 6'd13}, '{6'd52, 6'd53},
    '{6'd13, 6'd14}, '{6'd53, 6'd54}, '{6'd14, 6'd15}, '{6'd54, 6'd55},
    '{6'd15, 6'd3},  '{6'd55, 6'd62}};
`include "onechan_top_body.svh"
endmodule
