// Reference models for the testbenches: chess move rules of the analyzer (5x5 reach,
// no castling/en passant/promotion), material evaluation, the TPU program and
// network used for end-to-end tests, and a recursive negamax.
package onechan_tb_pkg;
  import onechan_pkg::*;

  typedef piece_t board_t [64];

  function automatic bit is_mine(piece_t p, bit side);
    return p != 8'h00 && p[6] == side;
  endfunction

  // All legal moves of the analyzer's rule set, in generator order
  // (square 0..63, then dy = -2..2, dx = -2..2).
  function automatic void ref_moves(input board_t b, input bit side, ref move_t list[$]);
    list.delete();
    for (int s = 0; s < 64; s++) begin
      piece_t p = b[s];
      if (!is_mine(p, side)) continue;
      for (int dy = -2; dy <= 2; dy++)
        for (int dx = -2; dx <= 2; dx++) begin
          int r = s / 8 + dy, c = s % 8 + dx;
          int ax = dx < 0 ? -dx : dx, ay = dy < 0 ? -dy : dy;
          int fwd = side ? -1 : 1;
          bit ok;
          piece_t t;
          if (r < 0 || r > 7 || c < 0 || c > 7 || (dx == 0 && dy == 0)) continue;
          t = b[r*8 + c];
          if (is_mine(t, side)) continue;
          case (1'b1)
            p[1]: ok = (ax * ay == 2);
            p[2]: ok = (ax == ay);
            p[3]: ok = (ax == 0 || ay == 0);
            p[4]: ok = (ax == ay) || ax == 0 || ay == 0;
            p[5]: ok = (ax < 2 && ay < 2);
            p[0]: begin
              ok = 0;
              if (dy == fwd && dx == 0 && t == 0) ok = 1;
              if (dy == fwd && ax == 1 && t != 0) ok = 1;
              if (dy == 2*fwd && dx == 0 && t == 0 && s / 8 == (side ? 6 : 1)) ok = 1;
            end
            default: ok = 0;
          endcase
          // sliding over two squares needs a free square in between
          if (ok && !p[1] && !p[5] && (ax == 2 || ay == 2) && (ax != 1 && ay != 1))
            if (b[(s/8 + dy/2)*8 + s%8 + dx/2] != 0) ok = 0;
          if (ok) list.push_back('{from: 6'(s), to: 6'(r*8 + c)});
        end
    end
  endfunction

  function automatic int material(input board_t b, input bit side);
    int v = 0;
    int val [6] = '{1, 3, 3, 5, 9, 50};
    for (int s = 0; s < 64; s++)
      for (int k = 0; k < 6; k++)
        if (b[s][k]) v += (b[s][6] == side) ? val[k] : -val[k];
    return v;
  endfunction

  function automatic int sat8(int v);
    return v > 127 ? 127 : (v < -128 ? -128 : v);
  endfunction

  // Value the TPU returns for a leaf with the material network: best material over the
  // leaf's moves, seen by the leaf's mover, saturated to 8 bits after the comparison.
  // Index of the first best move in idx.
  function automatic int leaf_value(input board_t b, input bit side, output int idx);
    move_t l[$];
    int best = -100000;
    ref_moves(b, side, l);
    idx = 0;
    foreach (l[i]) begin
      board_t nb = b;
      int v;
      nb[l[i].to] = nb[l[i].from];
      nb[l[i].from] = 0;
      v = material(nb, side);
      if (v > best) begin best = v; idx = i; end
    end
    return sat8(best);
  endfunction

  // Negamax of the traversal, depth first with an explicit stack: nodes at depth maxd
  // are leaves valued by leaf_value (NEG_INF without moves).
  function automatic int negamax(input board_t root, input int maxd,
                                 output move_t bm, output bit found);
    board_t bs [8];
    move_t  lists [8][$];
    move_t  cur [8];
    int     pos [8];
    int     best [8];
    int     d = 0;
    found = 0;
    bm = '0;
    bs[0] = root;
    ref_moves(bs[0], 1'b0, lists[0]);
    pos[0] = 0;
    best[0] = NEG_INF;
    forever begin
      if (pos[d] < lists[d].size()) begin
        move_t  m = lists[d][pos[d]];
        board_t nb = bs[d];
        pos[d]++;
        nb[m.to] = nb[m.from];
        nb[m.from] = 0;
        if (d + 1 == maxd) begin
          move_t l[$];
          int idx, v;
          bit side = maxd[0];
          ref_moves(nb, side, l);
          v = (l.size() == 0) ? NEG_INF : leaf_value(nb, side, idx);
          if (-v > best[d]) begin
            best[d] = -v;
            if (d == 0) begin bm = m; found = 1; end
          end
        end else begin
          d++;
          bs[d] = nb;
          cur[d] = m;
          ref_moves(bs[d], d[0], lists[d]);
          pos[d] = 0;
          best[d] = NEG_INF;
        end
      end else begin
        int v;
        if (d == 0) return best[0];
        v = best[d];
        d--;
        if (-v > best[d]) begin
          best[d] = -v;
          if (d == 0) begin bm = cur[1]; found = 1; end
        end
      end
    end
  endfunction

  function automatic board_t start_board();
    board_t b;
    piece_t back [8] = '{WR, WN, WB, WQ, WK, WB, WN, WR};
    for (int s = 0; s < 64; s++) b[s] = 0;
    for (int c = 0; c < 8; c++) begin
      b[c] = back[c]; b[8+c] = WP; b[48+c] = BP; b[56+c] = back[c] | 8'h40;
    end
    return b;
  endfunction

  // ---- TPU program: evaluate every move, keep the best, report it ----
  // Register use: r1 move count, r2 move index, r3 best value, r4 best index,
  // r5 layer-count record, r6 layer index, r7 layer record, r8 network output.
  function automatic void tpu_program(ref logic [31:0] p[$]);
    p.delete();
    p.push_back(i_branch(B_EQ, 5'd1, 5'd0, 12'd0));        // 0: wait for moves
    p.push_back(i_itype(F_ADD, 5'd0, 12'd0, 6'd2));         // 1: m = 0
    p.push_back(i_itype(F_ADD, 5'd0, 12'h800, 6'd3));       // 2: best = -2048
    p.push_back(i_itype(F_ADD, 5'd0, 12'd0, 6'd4));         // 3: best index = 0
    p.push_back(i_load(2'd0, 5'd0, 12'd0, 6'd5));           // 4: layer-count record
    p.push_back(i_special(S_DECODE_LAYER, 5'd5, 5'd0, 6'd0));   // 5
    p.push_back(i_special(S_COMPUTE_GRID, 5'd2, 5'd0, 6'd0));   // 6: move loop
    p.push_back(i_special(S_COMPUTE_IFMAP, 5'd0, 5'd0, 6'd0));  // 7
    p.push_back(i_itype(F_ADD, 5'd0, 12'd0, 6'd6));         // 8: l = 0
    p.push_back(i_load(2'd0, 5'd6, 12'd1, 6'd7));           // 9: layer loop
    p.push_back(i_special(S_DECODE_LAYER_INFO, 5'd7, 5'd0, 6'd0)); // 10
    p.push_back(i_special(S_SEND_LAYER_INFO, 5'd0, 5'd0, 6'd0));   // 11
    p.push_back(i_special(S_LOAD_WEIGHT, 5'd0, 5'd0, 6'd0));       // 12
    p.push_back(i_special(S_LOAD_BIAS, 5'd0, 5'd0, 6'd0));         // 13
    p.push_back(i_special(S_SEND_SYSTOLIC, 5'd0, 5'd0, 6'd0));     // 14
    p.push_back(i_special(S_SET_IFMAP_O, 5'd0, 5'd0, 6'd8));       // 15
    p.push_back(i_itype(F_ADD, 5'd6, 12'd1, 6'd6));         // 16: l++
    p.push_back(i_branch(B_LT, 5'd6, 5'd22, 12'd9));        // 17
    p.push_back(i_branch(B_GE, 5'd3, 5'd8, 12'd21));        // 18: keep best
    p.push_back(i_itype(F_ADD, 5'd8, 12'd0, 6'd3));         // 19
    p.push_back(i_itype(F_ADD, 5'd2, 12'd0, 6'd4));         // 20
    p.push_back(i_itype(F_ADD, 5'd2, 12'd1, 6'd2));         // 21: m++
    p.push_back(i_branch(B_LT, 5'd2, 5'd1, 12'd6));         // 22
    p.push_back(i_special(S_SEND_OPT_MOVE, 5'd3, 5'd4, 6'd0));     // 23
    p.push_back(i_itype(F_ADD, 5'd0, 12'd0, 6'd1));         // 24: clear move count
    p.push_back(i_jump(12'd0));                              // 25
  endfunction

  // Layer record: kernel h,w (1..8), weight offset, bias h,w, bias offset, flags.
  function automatic logic [31:0] layer_rec(int wh, int ww, int wa, int bh, int bw, int ba,
                                            bit relu, bit conv, bit flat);
    return {3'(wh-1), 3'(ww-1), 8'(wa), 3'(bh-1), 3'(bw-1), 8'(ba), relu, conv, flat, 1'b0};
  endfunction

  // Material network: 8x8 board * ones(8x1) -> 8x1, flattened to 1x8, * ones(8x1) -> 1x1.
  function automatic void material_net(ref logic [31:0] mem[$]);
    mem.delete();
    for (int i = 0; i < 768; i++) mem.push_back(32'd0);
    mem[0] = {4'd8, 4'd8, 4'd2, 20'd0};
    mem[1] = layer_rec(8, 1, 0, 1, 1, 0, 0, 0, 1);
    mem[2] = layer_rec(8, 1, 8, 1, 1, 1, 0, 0, 0);
    for (int i = 0; i < 16; i++) mem[256 + i] = 32'd1;
  endfunction

endpackage
