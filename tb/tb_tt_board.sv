// tt_board: reset position, search apply/undo with captured piece, player moves and
// undos through the history (including a full history), init.
module tb_tt_board;
  import onechan_pkg::*;
  import onechan_tb_pkg::*;

  logic clk = 0, rst_n = 1;

  initial #1 rst_n = 0;  // an asynchronous reset needs an edge after time 0
  logic init = 0, apply = 0, undo = 0, user_move = 0, user_undo = 0;
  move_t mv = '0, user_mv = '0;
  piece_t cap_in = '0, cap_out;
  logic [2:0] hist_cnt;
  piece_t board [64];
  board_t ref_b;
  int checks = 0, failures = 0;

  tt_board #(.HIST(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic cmp(string what);
    foreach (ref_b[s]) begin
      checks++;
      if (board[s] !== ref_b[s]) begin
        failures++;
        $display("FAIL: %s square %0d = %h, expected %h", what, s, board[s], ref_b[s]);
      end
    end
  endtask

  task automatic one(string what, ref logic sig);
    sig = 1; @(posedge clk); #1 sig = 0;
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    piece_t c;
    move_t  ms [5];
    piece_t caps [5];
    board_t saved [6];
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    ref_b = start_board();
    cmp("reset");
    // search apply / undo with capture: b1 knight to d7 (black pawn)
    mv = '{from: 6'd1, to: 6'd51};
    #1;
    checks++; if (cap_out != BP) begin failures++; $display("FAIL: cap_out %h", cap_out); end
    c = cap_out;
    one("apply", apply);
    ref_b[51] = WN; ref_b[1] = 0;
    cmp("apply");
    cap_in = c;
    one("undo", undo);
    ref_b = start_board();
    cmp("undo");
    // five player moves into a history of four, then undo them
    ms = '{'{6'd12, 6'd28}, '{6'd51, 6'd35}, '{6'd28, 6'd35}, '{6'd59, 6'd35}, '{6'd6, 6'd21}};
    saved[0] = ref_b;
    for (int i = 0; i < 5; i++) begin
      user_mv = ms[i];
      one("user move", user_move);
      ref_b[ms[i].to] = ref_b[ms[i].from]; ref_b[ms[i].from] = 0;
      saved[i+1] = ref_b;
      cmp($sformatf("user move %0d", i));
    end
    checks++; if (hist_cnt != 4) begin failures++; $display("FAIL: hist_cnt %0d", hist_cnt); end
    // undo the four recorded moves (0..3); move 4 was played without history
    for (int i = 3; i >= 0; i--) begin
      one("user undo", user_undo);
      ref_b[ms[i].from] = ref_b[ms[i].to];
      ref_b[ms[i].to] = saved[i][ms[i].to];
      cmp($sformatf("user undo %0d", i));
    end
    one("user undo empty", user_undo);
    cmp("undo with empty history");
    one("init", init);
    ref_b = start_board();
    cmp("init");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
