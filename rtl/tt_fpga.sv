// Tree-traversal FPGA: the player's board, the move generator, the step-step-spray
// search and the SPI master towards the TPU FPGA, with the board's user interface.
//
// User interface: sw[11:6] and sw[5:0] give the from and to squares of a move;
// buttons btn[0] run the search, btn[1] plays the switch move, btn[2] undoes the last
// played move, btn[3]/btn[4] scroll the displayed row up/down. Button presses are
// ignored while the search runs. The seven-segment display shows one board row. The
// LEDs show the search result: led[11:6] from, led[5:0] to, led[12] a move was found,
// led[13] search running.
// The division into these units and the I/O roles follow the description; the pin
// assignment is this design's choice.
module tt_fpga
  import onechan_pkg::*;
#(
  parameter int DEPTH     = 3,
  parameter int MAX_MOVES = 128,
  parameter int CLK_DIV   = 8,
  parameter int DEBOUNCE  = 100000,
  parameter int REFRESH   = 100000,
  parameter int HIST      = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] sw,
  input  logic [4:0]  btn,
  output logic [13:0] led,
  output logic [7:0]  an_n,
  output logic [6:0]  seg_n,
  output logic        dp_n,
  output logic        sclk,
  output logic        mosi,
  input  logic        miso,
  output logic        cs_n
);

  logic [4:0] press;
  piece_t     board [64];
  logic       b_apply, b_undo;
  move_t      b_mv;
  piece_t     b_cap_in, b_cap_out;
  logic       mg_step, mg_spray, mg_side, mg_busy, mg_valid, mg_done, mg_none;
  sq_t        mg_from;
  logic [4:0] mg_idx, mg_mv_idx;
  move_t      mg_mv;
  logic       spi_start, spi_last, spi_done, spi_busy;
  logic [7:0] spi_tx, spi_rx;
  logic       t_busy, t_done, found;
  move_t      best_move;
  logic signed [15:0] best_value;
  logic [2:0] row;
  logic [$clog2(HIST+1)-1:0] hist_cnt;

  tt_buttons #(.N(5), .DEBOUNCE(DEBOUNCE)) u_btn (
    .clk(clk), .rst_n(rst_n), .btn(btn), .press(press));

  tt_board #(.HIST(HIST)) u_board (
    .clk(clk), .rst_n(rst_n), .init(1'b0), .apply(b_apply), .undo(b_undo),
    .mv(b_mv), .cap_in(b_cap_in), .cap_out(b_cap_out),
    .user_move(press[1] && !t_busy), .user_undo(press[2] && !t_busy),
    .user_mv('{from: sw[11:6], to: sw[5:0]}), .hist_cnt(hist_cnt), .board(board));

  tt_movegen u_mg (
    .clk(clk), .rst_n(rst_n), .board(board), .side(mg_side), .step(mg_step),
    .spray(mg_spray), .resume_from(mg_from), .resume_idx(mg_idx), .busy(mg_busy),
    .mv_valid(mg_valid), .mv(mg_mv), .mv_idx(mg_mv_idx), .done(mg_done), .none(mg_none));

  tt_traversal #(.DEPTH(DEPTH), .MAX_MOVES(MAX_MOVES)) u_trav (
    .clk(clk), .rst_n(rst_n), .start(press[0] && !t_busy), .busy(t_busy), .done(t_done),
    .best_move(best_move), .best_value(best_value), .found(found),
    .board(board), .b_apply(b_apply), .b_undo(b_undo), .b_mv(b_mv),
    .b_cap_in(b_cap_in), .b_cap_out(b_cap_out),
    .mg_step(mg_step), .mg_spray(mg_spray), .mg_side(mg_side), .mg_from(mg_from),
    .mg_idx(mg_idx), .mg_valid(mg_valid), .mg_mv(mg_mv), .mg_mv_idx(mg_mv_idx),
    .mg_done(mg_done), .mg_none(mg_none),
    .spi_start(spi_start), .spi_tx(spi_tx), .spi_last(spi_last), .spi_rx(spi_rx),
    .spi_done(spi_done));

  spi_master #(.CLK_DIV(CLK_DIV)) u_spi (
    .clk(clk), .rst_n(rst_n), .start(spi_start), .tx_byte(spi_tx), .last(spi_last),
    .rx_byte(spi_rx), .done(spi_done), .busy(spi_busy),
    .sclk(sclk), .mosi(mosi), .miso(miso), .cs_n(cs_n));

  tt_sevenseg #(.REFRESH(REFRESH)) u_7seg (
    .clk(clk), .rst_n(rst_n), .board(board), .up(press[3]), .down(press[4]),
    .row(row), .an_n(an_n), .seg_n(seg_n), .dp_n(dp_n));

  assign led = {t_busy, found, best_move.from, best_move.to};

endmodule
