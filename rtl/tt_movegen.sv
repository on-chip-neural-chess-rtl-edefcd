// Stateful move generator of the tree-traversal FPGA.
//
// A search starts at a resume point (resume_from, resume_idx). The "from" register
// walks the squares upward until it holds a piece of the side to move; for that piece
// a 5-bit candidate index 0..24 walks the 5x5 neighbourhood dx,dy in {-2..2}. Each
// cycle examines one square (when it holds no piece of the mover) or one candidate.
// A candidate is accepted when it stays on the board, does not land on a friendly
// piece, is allowed for the piece type by the 5x5 reach map (queen/bishop on the
// diagonals, queen/rook on the lines, king on the inner ring, knight on the knight
// squares), and, for a line or diagonal step of two, the inner-ring square in between
// is empty. Pawns step one square forward onto an empty square, two from their
// starting row when both squares are empty, and capture one square diagonally forward.
//
//   step  : search for the next move from the resume point; one mv_valid pulse with
//           done, or done with none=1 when no move is left.
//   spray : emit every move of the position (mv_valid per move), then done.
// mv_idx is the candidate index of the emitted move; resuming at (from, idx+1) after a
// step gives the next move, so the (from, idx) pair stored on the traversal stack
// makes successive steps return new moves. resume_idx = 25 means "next square".
// Latency: one cycle per square (the step to the next square) plus one per candidate.
//
// The 5x5 reach map and the inner-ring blocking follow the description. The raster
// order of the 25 candidates, the pawn rules, and the absence of castling, en passant,
// promotion and check detection are this design's choices.
module tt_movegen
  import onechan_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  piece_t      board [64],
  input  logic        side,          // 0: white to move, 1: black
  input  logic        step,
  input  logic        spray,
  input  sq_t         resume_from,
  input  logic [4:0]  resume_idx,
  output logic        busy,
  output logic        mv_valid,
  output move_t       mv,
  output logic [4:0]  mv_idx,
  output logic        done,
  output logic        none
);

  logic       active, spraying;
  sq_t        from_q;
  logic [4:0] idx_q;

  // Candidate geometry
  logic signed [3:0] dx, dy, fr, fc, tr, tc, mr, mc;
  logic [2:0]  adx, ady;
  piece_t      pc, tgt, mid;
  logic        own_piece, on_board, is_line2, reach, cand_ok;
  sq_t         to_sq;

  always_comb begin
    dx  = 4'(signed'({1'b0, idx_q}) % 5) - 4'sd2;
    dy  = 4'(signed'({1'b0, idx_q}) / 5) - 4'sd2;
    adx = dx[3] ? 3'(-dx) : 3'(dx);
    ady = dy[3] ? 3'(-dy) : 3'(dy);
    fr  = signed'({1'b0, from_q[5:3]});
    fc  = signed'({1'b0, from_q[2:0]});
    tr  = fr + dy;
    tc  = fc + dx;
    mr  = fr + (dy >>> 1);
    mc  = fc + (dx >>> 1);
    pc  = board[from_q];
    own_piece = (pc[5:0] != 6'd0) && (pc[P_BLACK] == side);
    on_board  = (tr >= 0) && (tr < 8) && (tc >= 0) && (tc < 8) && (idx_q < 5'd25);
    to_sq     = sq_t'({tr[2:0], tc[2:0]});
    tgt       = on_board ? board[to_sq] : EMPTY;
    mid       = board[sq_t'({mr[2:0], mc[2:0]})];
    is_line2  = (adx == 3'd2 || adx == 3'd0) && (ady == 3'd2 || ady == 3'd0) && !(adx == 0 && ady == 0);
    reach = 1'b0;
    if (pc[P_KNIGHT]) reach = (adx == 1 && ady == 2) || (adx == 2 && ady == 1);
    if (pc[P_BISHOP]) reach = (adx == ady) && adx != 0;
    if (pc[P_ROOK])   reach = (adx == 0) != (ady == 0);
    if (pc[P_QUEEN])  reach = ((adx == ady) && adx != 0) || ((adx == 0) != (ady == 0));
    if (pc[P_KING])   reach = (adx <= 1) && (ady <= 1) && !(adx == 0 && ady == 0);
    if (pc[P_PAWN]) begin
      // forward is +row for white, -row for black
      if ((side == 1'b0 && dy == 1) || (side == 1'b1 && dy == -1))
        reach = (dx == 0) ? (tgt == EMPTY)
              : (adx == 1) ? (tgt != EMPTY && tgt[P_BLACK] != side) : 1'b0;
      else if ((side == 1'b0 && dy == 2 && fr == 1) || (side == 1'b1 && dy == -2 && fr == 6))
        reach = (dx == 0) && (tgt == EMPTY);
    end
    cand_ok = own_piece && on_board && reach
            && !(tgt != EMPTY && tgt[P_BLACK] == side)
            && !(is_line2 && mid != EMPTY);
  end

  assign busy = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      spraying <= 1'b0;
      from_q   <= '0;
      idx_q    <= '0;
      mv_valid <= 1'b0;
      mv       <= '0;
      mv_idx   <= '0;
      done     <= 1'b0;
      none     <= 1'b0;
    end else begin
      mv_valid <= 1'b0;
      done     <= 1'b0;
      none     <= 1'b0;
      if (!active) begin
        if (step || spray) begin
          active   <= 1'b1;
          spraying <= spray;
          from_q   <= resume_from;
          idx_q    <= resume_idx;
        end
      end else if (!own_piece || idx_q >= 5'd25) begin
        // move the from register to the next square
        if (from_q == 6'd63) begin
          active <= 1'b0;
          done   <= 1'b1;
          none   <= !spraying;
        end else begin
          from_q <= from_q + 6'd1;
          idx_q  <= '0;
        end
      end else begin
        idx_q <= idx_q + 5'd1;
        if (cand_ok) begin
          mv_valid <= 1'b1;
          mv       <= '{from: from_q, to: to_sq};
          mv_idx   <= idx_q;
          if (!spraying) begin
            active <= 1'b0;
            done   <= 1'b1;
          end
        end
      end
    end
  end

endmodule
