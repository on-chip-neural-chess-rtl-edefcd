// Neural chess analyzer: two FPGAs joined by SPI.
//
// The tree-traversal FPGA (clk_tt) holds the game, takes moves from switches and
// buttons, and on a run press searches the move tree DEPTH plies deep with negamax.
// Every leaf is sent with all its moves to the tiny-TPU FPGA (clk_tpu), whose
// neural-network program returns the best value over those moves; the best root move
// is shown on the LEDs. The SPI wires between the two boards are internal here; the
// TPU's program and data load ports are brought out. The two clocks may differ; the
// TPU clock must run at least four times as fast as SCLK (see spi_slave), i.e.
// clk_tpu >= 2 * clk_tt / CLK_DIV.
// The two-board partition follows the description; the rest is detailed per module.
module onechan_top
  import onechan_pkg::*;
#(
  parameter int DEPTH     = 3,
  parameter int MAX_MOVES = 128,
  parameter int CLK_DIV   = 8,
  parameter int DEBOUNCE  = 100000,
  parameter int REFRESH   = 100000,
  parameter int HIST      = 16
) (
  input  logic        clk_tt,
  input  logic        clk_tpu,
  input  logic        rst_n,
  // board user interface
  input  logic [11:0] sw,
  input  logic [4:0]  btn,
  output logic [13:0] led,
  output logic [7:0]  an_n,
  output logic [6:0]  seg_n,
  output logic        dp_n,
  // TPU program / data load
  input  logic        prog_we,
  input  logic [11:0] prog_addr,
  input  logic [31:0] prog_data,
  input  logic        mem_we,
  input  logic [11:0] mem_waddr,
  input  logic [31:0] mem_wdata,
  // TPU status
  output logic [11:0] tpu_pc,
  output logic        tpu_pkt_err,
  output logic        tpu_res_valid,
  output logic [7:0]  tpu_res_value,
  output logic [7:0]  tpu_res_index
);

  logic sclk, mosi, miso, cs_n;

  tt_fpga #(.DEPTH(DEPTH), .MAX_MOVES(MAX_MOVES), .CLK_DIV(CLK_DIV),
            .DEBOUNCE(DEBOUNCE), .REFRESH(REFRESH), .HIST(HIST)) u_tt (
    .clk(clk_tt), .rst_n(rst_n), .sw(sw), .btn(btn), .led(led), .an_n(an_n),
    .seg_n(seg_n), .dp_n(dp_n), .sclk(sclk), .mosi(mosi), .miso(miso), .cs_n(cs_n));

  tpu_fpga #(.MAX_MOVES(MAX_MOVES)) u_tpu (
    .clk(clk_tpu), .rst_n(rst_n), .sclk(sclk), .mosi(mosi), .cs_n(cs_n), .miso(miso),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .mem_we(mem_we), .mem_waddr(mem_waddr), .mem_wdata(mem_wdata),
    .pc(tpu_pc), .pkt_err(tpu_pkt_err), .res_valid(tpu_res_valid),
    .res_value(tpu_res_value), .res_index(tpu_res_index));

endmodule
