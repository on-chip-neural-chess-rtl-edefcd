// Tiny TPU FPGA: evaluates the moves of a search leaf with a small neural network.
//
// The SPI slave and packet receiver store the leaf's grid and moves and write the move
// count into register 1; the program in instruction memory, waiting in a loop while
// that count is zero, then evaluates each move (play it on the grid, build the input
// map, run every layer through the systolic array) and reports the best value and its
// move index with send_optimal_move; the receiver answers the traversal FPGA's polls
// with them. The instruction and main memories are filled through the load ports
// before use. The register file's single write port is shared: the layer engine
// owns it while it loads weights or biases, the core otherwise.
// The partition into these units follows the description's block diagram; the
// load ports are this design's choice.
module tpu_fpga
  import onechan_pkg::*;
#(
  parameter int MAX_MOVES = 128,
  parameter int AW        = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sclk,
  input  logic          mosi,
  input  logic          cs_n,
  output logic          miso,
  input  logic          prog_we,
  input  logic [AW-1:0] prog_addr,
  input  logic [31:0]   prog_data,
  input  logic          mem_we,
  input  logic [AW-1:0] mem_waddr,
  input  logic [31:0]   mem_wdata,
  output logic [11:0]   pc,
  output logic          pkt_err,
  output logic          res_valid,
  output logic [7:0]    res_value,
  output logic [7:0]    res_index
);

  // SPI / packet
  logic       sel, rx_valid;
  logic [7:0] rx_byte, tx_byte;
  piece_t     grid [64];
  logic       side;
  logic [$clog2(MAX_MOVES)-1:0] mv_idx;
  move_t      mv;
  logic       mtn_we;
  logic [31:0] mtn;

  // core
  logic [31:0] instr, rd1, rd2;
  logic [4:0]  ra1, ra2;
  logic        c_we, lnum_we, linfo_we;
  logic [1:0]  c_group;
  logic [5:0]  c_addr;
  logic [31:0] c_data;
  logic [31:0] lnum [3];
  logic [31:0] linfo [9];
  logic [11:0] c_mem_addr;
  logic [31:0] c_mem_data;
  logic        eng_start, eng_done, eng_busy;
  special_e    eng_code;
  logic [31:0] eng_opnd, eng_res;

  // engine
  logic        e_we;
  logic [1:0]  e_group;
  logic [5:0]  e_addr;
  logic [31:0] e_data;
  logic [11:0] e_mem_addr;
  logic [31:0] e_mem_data;
  logic [31:0] cfg [12];
  logic [31:0] w_all [64];
  logic [31:0] b_all [64];

  spi_slave u_spi (
    .clk(clk), .rst_n(rst_n), .sclk(sclk), .mosi(mosi), .cs_n(cs_n), .miso(miso),
    .tx_byte(tx_byte), .sel(sel), .rx_byte(rx_byte), .rx_valid(rx_valid));

  tpu_packet_rx #(.MAX_MOVES(MAX_MOVES)) u_pkt (
    .clk(clk), .rst_n(rst_n), .sel(sel), .rx_valid(rx_valid), .rx_byte(rx_byte),
    .tx_byte(tx_byte), .grid(grid), .side(side), .mv_idx(mv_idx), .mv(mv),
    .mtn_we(mtn_we), .mtn(mtn), .pkt_err(pkt_err),
    .res_valid(res_valid), .res_value(res_value), .res_index(res_index));

  tpu_instr_rom #(.AW(AW)) u_rom (
    .clk(clk), .raddr(AW'(pc)), .rdata(instr),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_data));

  tpu_main_mem #(.AW(AW)) u_mem (
    .clk(clk), .raddr_a(AW'(c_mem_addr)), .rdata_a(c_mem_data),
    .raddr_b(AW'(e_mem_addr)), .rdata_b(e_mem_data),
    .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata));

  tpu_regfile u_rf (
    .clk(clk), .rst_n(rst_n), .ra1(ra1), .ra2(ra2), .rd1(rd1), .rd2(rd2),
    .we(eng_busy ? e_we : c_we), .wgroup(eng_busy ? e_group : c_group),
    .waddr(eng_busy ? e_addr : c_addr), .wdata(eng_busy ? e_data : c_data),
    .mtn_we(mtn_we), .mtn(mtn), .lnum_we(lnum_we), .lnum(lnum),
    .linfo_we(linfo_we), .linfo(linfo), .cfg(cfg), .w_all(w_all), .b_all(b_all));

  tpu_core u_core (
    .clk(clk), .rst_n(rst_n), .pc(pc), .instr(instr),
    .ra1(ra1), .ra2(ra2), .rd1(rd1), .rd2(rd2),
    .rf_we(c_we), .rf_group(c_group), .rf_addr(c_addr), .rf_data(c_data),
    .lnum_we(lnum_we), .lnum(lnum), .linfo_we(linfo_we), .linfo(linfo),
    .mem_addr(c_mem_addr), .mem_data(c_mem_data),
    .eng_start(eng_start), .eng_code(eng_code), .eng_opnd(eng_opnd),
    .eng_done(eng_done), .eng_res(eng_res),
    .res_valid(res_valid), .res_value(res_value), .res_index(res_index));

  tpu_layer_engine #(.MAX_MOVES(MAX_MOVES)) u_eng (
    .clk(clk), .rst_n(rst_n), .start(eng_start), .code(eng_code), .opnd(eng_opnd),
    .done(eng_done), .res(eng_res), .grid(grid), .side(side), .mv_idx(mv_idx), .mv(mv),
    .cfg(cfg), .w_all(w_all), .b_all(b_all),
    .rf_we(e_we), .rf_group(e_group), .rf_addr(e_addr), .rf_data(e_data),
    .mem_addr(e_mem_addr), .mem_data(e_mem_data), .busy(eng_busy));

endmodule
