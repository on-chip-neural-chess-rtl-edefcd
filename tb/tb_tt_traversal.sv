// tt_traversal with the real move generator, a board model that applies and takes
// back moves, and a byte-level model of the SPI link and TPU. The TPU model checks
// each leaf packet (sync, side, count, checksum, and that the moves are exactly the
// leaf's move list), answers polls "not ready" a random number of times, then returns
// the leaf value of the material evaluation. Best move and value are compared with the
// reference negamax on the start position and on random sparse positions, and the
// board must be back at the root position when the search is done.
module tb_tt_traversal;
  import onechan_pkg::*;
  import onechan_tb_pkg::*;
  localparam int WATCHDOG = 100000000;
  localparam int DEPTH    = 3;
  `include "tb_common.svh"
  logic rst_n = 1;
  initial #1 rst_n = 0;  // an asynchronous reset needs an edge after time 0
  logic start = 0, busy, done, found;
  move_t best_move;
  logic signed [15:0] best_value;
  piece_t board [64];
  logic b_apply, b_undo;
  move_t b_mv;
  piece_t b_cap_in, b_cap_out;
  logic mg_step, mg_spray, mg_side, mg_valid, mg_done, mg_none, mg_busy;
  sq_t mg_from;
  logic [4:0] mg_idx, mg_mv_idx;
  move_t mg_mv;
  logic spi_start, spi_last;
  logic [7:0] spi_tx;
  logic [7:0] spi_rx = 0;
  logic spi_done = 0;

  tt_traversal #(.DEPTH(DEPTH)) dut (.*);
  tt_movegen u_mg (.clk, .rst_n, .board, .side(mg_side), .step(mg_step), .spray(mg_spray),
    .resume_from(mg_from), .resume_idx(mg_idx), .busy(mg_busy), .mv_valid(mg_valid),
    .mv(mg_mv), .mv_idx(mg_mv_idx), .done(mg_done), .none(mg_none));

  // board model
  assign b_cap_out = board[b_mv.to];
  always @(posedge clk) begin
    if (b_apply) begin
      board[b_mv.to]   <= board[b_mv.from];
      board[b_mv.from] <= EMPTY;
    end else if (b_undo) begin
      board[b_mv.from] <= board[b_mv.to];
      board[b_mv.to]   <= b_cap_in;
    end
  end

  // SPI link + TPU model
  logic [7:0] tr [$];
  int n_pkts = 0, n_polls = 0, n_retry = 0, pkt_bad = 0, not_ready = 0;
  bit have_res = 0;
  int res_v, res_i;
  always @(posedge clk) begin
    spi_done <= 0;
    if (spi_start) begin
      automatic logic [7:0] b = spi_tx;
      automatic bit lst = spi_last;
      automatic int k = tr.size();
      tr.push_back(b);
      // reply byte k of the transaction
      spi_rx <= 8'h00;
      if (tr[0] != PKT_SYNC) begin
        if (k == 1) spi_rx <= {7'd0, have_res && not_ready == 0};
        if (k == 2) spi_rx <= 8'(res_v);
        if (k == 3) spi_rx <= 8'(res_i);
      end
      repeat ($urandom_range(1, 4)) @(posedge clk);
      spi_done <= 1;
      if (lst) begin
        if (tr[0] == PKT_SYNC) leaf_packet();
        else begin
          n_polls++;
          if (tr[0] != RD_CMD || tr.size() != 4) pkt_bad++;
          if (not_ready > 0) begin not_ready--; n_retry++; end
          else if (have_res) have_res = 0;
        end
        tr.delete();
      end
    end
  end

  task automatic leaf_packet();
    board_t g;
    move_t l [$];
    logic [7:0] cs = 0;
    int n = tr[2];
    n_pkts++;
    for (int i = 1; i < tr.size() - 1; i++) cs ^= tr[i];
    if (cs != tr[tr.size() - 1] || tr.size() != 68 + 2 * n || tr[1] > 1) pkt_bad++;
    for (int s = 0; s < 64; s++) g[s] = tr[3 + s];
    ref_moves(g, tr[1][0], l);
    if (l.size() != n) pkt_bad++;
    else foreach (l[i]) if (tr[67 + 2*i] != l[i].from || tr[68 + 2*i] != l[i].to) pkt_bad++;
    res_v = leaf_value(g, tr[1][0], res_i);
    have_res = 1;
    not_ready = $urandom_range(0, 2);
  endtask

  function automatic piece_t rand_piece(bit black);
    return piece_t'((8'd1 << $urandom_range(0, 5)) | (black ? 8'h40 : 8'h00));
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      board_t b;
      move_t bm;
      bit fnd;
      int v;
      if (t == 0) b = start_board();
      else begin
        for (int s = 0; s < 64; s++) b[s] = EMPTY;
        for (int k = 0; k < 2 + t / 2; k++) begin
          b[$urandom_range(0, 63)] = rand_piece(0);
          b[$urandom_range(0, 63)] = rand_piece(1);
        end
      end
      if (t == 5) begin // white without pieces: the root has no move
        for (int s = 0; s < 64; s++) if (is_mine(b[s], 0)) b[s] = EMPTY;
      end
      @(negedge clk);
      board = b;
      pkt_bad = 0;
      v = negamax(b, DEPTH, bm, fnd);
      start = 1;
      @(negedge clk); start = 0;
      check(busy, "busy after start");
      for (int c = 0; !done; c++) begin
        if (c == 20000000) begin
          check(0, $sformatf("t=%0d search did not finish", t));
          finish();
        end
        @(negedge clk);
      end
      check(!busy, "idle after done");
      check(found == fnd, $sformatf("t=%0d found %0d expected %0d", t, found, fnd));
      check(int'(best_value) == v, $sformatf("t=%0d value %0d expected %0d", t, best_value, v));
      if (fnd) check(best_move == bm, $sformatf("t=%0d best move %0d-%0d expected %0d-%0d",
                                                t, best_move.from, best_move.to, bm.from, bm.to));
      check(board == b, "board restored after the search");
      check(pkt_bad == 0, $sformatf("%0d malformed packets", pkt_bad));
      $display("position %0d: value %0d, %0d leaf packets so far", t, v, n_pkts);
    end
    check(n_pkts > 100 && n_retry > 50, $sformatf("packets %0d retries %0d", n_pkts, n_retry));
    finish();
  end
endmodule
