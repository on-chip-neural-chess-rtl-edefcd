// Game board of the tree-traversal FPGA: 64 one-hot piece bytes in registers.
//
// The whole board is an output so the move generator, the packet builder and the
// display read it without ports of their own. One operation per cycle, in priority:
//   init       load the standard starting position
//   apply      move from -> to; the piece on "to" before the move is cap_out
//              (combinational), which the caller keeps for the undo
//   undo       put the piece on "to" back on "from" and cap_in back on "to"
//   user_move  apply the player's move and push it on a history of HIST entries
//   user_undo  pop the last player move and take it back
// apply/undo are used by the search, user_move/user_undo by the buttons; the caller
// keeps them apart. hist_cnt is the number of player moves that can be undone; a
// user_move with a full history drops nothing and is still played, only its undo is
// lost (the oldest entry is kept). Legality of a player move is not checked.
// The 64-entry, 8-bit board follows the description; the history depth, the
// starting-position loader and the unchecked player moves are this design's choices.
module tt_board
  import onechan_pkg::*;
#(
  parameter int HIST = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   init,
  input  logic   apply,
  input  logic   undo,
  input  move_t  mv,
  input  piece_t cap_in,
  output piece_t cap_out,
  input  logic   user_move,
  input  logic   user_undo,
  input  move_t  user_mv,
  output logic [$clog2(HIST+1)-1:0] hist_cnt,
  output piece_t board [64]
);

  typedef struct packed {
    move_t  mv;
    piece_t cap;
  } hist_t;

  hist_t hist [HIST];
  hist_t top;

  assign cap_out = board[mv.to];
  assign top     = hist[hist_cnt == 0 ? 0 : int'(hist_cnt) - 1];

  function automatic piece_t start_piece(int sq);
    piece_t back [8] = '{WR, WN, WB, WQ, WK, WB, WN, WR};
    int r = sq / 8;
    logic [2:0] c = 3'(sq % 8);
    if (r == 0) return back[c];
    if (r == 1) return WP;
    if (r == 6) return BP;
    if (r == 7) return back[c] | piece_t'(8'h40);
    return EMPTY;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 64; i++) board[i] <= start_piece(i);
      hist_cnt <= '0;
    end else if (init) begin
      for (int i = 0; i < 64; i++) board[i] <= start_piece(i);
      hist_cnt <= '0;
    end else if (apply) begin
      board[mv.to]   <= board[mv.from];
      board[mv.from] <= EMPTY;
    end else if (undo) begin
      board[mv.from] <= board[mv.to];
      board[mv.to]   <= cap_in;
    end else if (user_move) begin
      board[user_mv.to]   <= board[user_mv.from];
      board[user_mv.from] <= EMPTY;
      if (int'(hist_cnt) < HIST) begin
        hist[int'(hist_cnt) % HIST] <= '{mv: user_mv, cap: board[user_mv.to]};
        hist_cnt       <= hist_cnt + 1'b1;
      end
    end else if (user_undo && hist_cnt != 0) begin
      board[top.mv.from] <= board[top.mv.to];
      board[top.mv.to]   <= top.cap;
      hist_cnt           <= hist_cnt - 1'b1;
    end
  end

endmodule
