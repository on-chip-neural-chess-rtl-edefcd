// tt_movegen against the reference move list on random positions for both sides:
// spray must emit exactly the reference list in order; chained steps resuming at
// (from, idx+1) must return the same sequence and then report none; spray latency is
// checked against one cycle per square plus 25 per piece of the mover.
module tb_tt_movegen;
  import onechan_pkg::*;
  import onechan_tb_pkg::*;
  localparam int WATCHDOG = 2000000;
  `include "tb_common.svh"
  logic rst_n = 1;
  initial #1 rst_n = 0;  // an asynchronous reset needs an edge after time 0
  piece_t board [64];
  logic side = 0, step = 0, spray = 0;
  sq_t resume_from = 0;
  logic [4:0] resume_idx = 0;
  logic busy, mv_valid, done, none;
  move_t mv;
  logic [4:0] mv_idx;

  tt_movegen dut (.*);

  function automatic piece_t rand_piece();
    int k = $urandom_range(0, 5);
    return piece_t'((8'd1 << k) | ($urandom_range(0, 1) ? 8'h40 : 8'h00));
  endfunction

  move_t exp_l [$], got [$];
  int cyc, n_mine, total_moves = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int dens = $urandom_range(5, 60);
      board_t b;
      if (t == 0) b = start_board();
      else for (int s = 0; s < 64; s++) b[s] = ($urandom_range(0, 99) < dens) ? rand_piece() : EMPTY;
      @(negedge clk);
      board = b;
      side  = t[0];
      ref_moves(b, side, exp_l);
      n_mine = 0;
      foreach (b[s]) if (is_mine(b[s], side)) n_mine++;
      total_moves += exp_l.size();
      // spray
      got.delete();
      resume_from = 0; resume_idx = 0; spray = 1;
      @(negedge clk); spray = 0;
      cyc = 1;
      while (!done) begin
        @(posedge clk); #1;
        if (mv_valid) got.push_back(mv);
        cyc++;
      end
      check(got == exp_l, $sformatf("spray list t=%0d: %0d vs %0d moves", t, got.size(), exp_l.size()));
      check(cyc <= 64 + 25 * n_mine + 3, $sformatf("spray latency %0d", cyc));
      // chained steps
      got.delete();
      resume_from = 0; resume_idx = 0;
      for (int k = 0; k <= exp_l.size(); k++) begin
        @(negedge clk); step = 1;
        @(negedge clk); step = 0;
        while (!done) @(negedge clk);
        if (none) begin
          check(k == exp_l.size(), "none only after the last move");
          break;
        end
        check(mv_valid, "step emits a move with done");
        got.push_back(mv);
        if (mv_idx == 5'd24) begin resume_from = mv.from + 1; resume_idx = 0; end
        else begin resume_from = mv.from; resume_idx = mv_idx + 1; end
        if (mv.from == 6'd63 && mv_idx == 5'd24) break;
      end
      check(got == exp_l, $sformatf("step sequence t=%0d", t));
    end
    check(total_moves > 1000, $sformatf("only %0d moves exercised", total_moves));
    finish();
  end
endmodule
