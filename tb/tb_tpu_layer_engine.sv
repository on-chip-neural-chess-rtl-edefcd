// tpu_layer_engine against a software model: move application and input map, then a
// network of convolution (with leaky ReLU), convolution with a full bias matrix,
// convolution with flatten and a matrix multiplication, checking every feature map,
// the set_ifmap_o result and the cycle count of each systolic pass.
module tb_tpu_layer_engine;
  import onechan_pkg::*;
  import onechan_tb_pkg::*;
  localparam int WATCHDOG = 100000;
  `include "tb_common.svh"
  logic rst_n = 1, start = 0, done, side = 1, rf_we, busy;
  initial #1 rst_n = 0;  // an asynchronous reset needs an edge after time 0
  special_e code = S_COMPUTE_GRID;
  logic [31:0] opnd = 0, res;
  piece_t grid [64];
  logic [6:0] mv_idx;
  move_t mv;
  logic [31:0] cfg [12], w_all [64], b_all [64];
  logic [1:0] rf_group;
  logic [5:0] rf_addr;
  logic [31:0] rf_data, mem_data;
  logic [11:0] mem_addr;
  logic [31:0] mem [4096];
  move_t moves [4];

  tpu_layer_engine dut (.*);

  assign mem_data = mem[mem_addr];
  assign mv = moves[mv_idx[1:0]];
  always @(posedge clk) if (rf_we) begin
    if (rf_group == 1) w_all[rf_addr] <= rf_data;
    if (rf_group == 2) b_all[rf_addr] <= rf_data;
  end

  // software model
  int X [8][8], Y [8][8];
  int xh, xw, yh, yw;

  function automatic int fin(int x, bit r);
    if (r && x < 0) x = x >>> 3;
    return x > 32767 ? 32767 : (x < -32768 ? -32768 : x);
  endfunction

  task automatic op(special_e c, logic [31:0] o = 0, output int cycles);
    int n = 0;
    @(negedge clk); code = c; opnd = o; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); n++; end
    cycles = n + 1;
  endtask

  task automatic layer(int wh, int ww, int wa, int bh, int bw, int ba, bit relu, bit conv, bit flat);
    int cyc, expect_cyc;
    cfg[3] = wh; cfg[4] = ww; cfg[5] = wa; cfg[6] = bh; cfg[7] = bw; cfg[8] = ba;
    cfg[9] = relu; cfg[10] = conv; cfg[11] = flat;
    for (int i = 0; i < wh * ww; i++) mem[256 + wa + i] = 32'($signed(8'($urandom)));
    for (int i = 0; i < bh * bw; i++) mem[512 + ba + i] = 32'($signed(10'($urandom)));
    op(S_SEND_LAYER_INFO, 0, cyc);
    op(S_LOAD_WEIGHT, 0, cyc);
    check(cyc == wh * ww + 3, $sformatf("load_weight cycles %0d", cyc));
    op(S_LOAD_BIAS, 0, cyc);
    op(S_SEND_SYSTOLIC, 0, cyc);
    // model
    yh = conv ? xh - wh + 1 : xh;
    yw = conv ? xw - ww + 1 : ww;
    for (int r = 0; r < yh; r++)
      for (int c = 0; c < yw; c++) begin
        automatic int s = 0;
        automatic int b = $signed(16'(mem[512 + ba + (bh == 1 ? 0 : r) * bw + (bw == 1 ? 0 : c)]));
        if (conv) begin
          for (int i = 0; i < wh; i++)
            for (int j = 0; j < ww; j++) s += X[r+i][c+j] * $signed(8'(mem[256 + wa + i*ww + j]));
        end else begin
          for (int k = 0; k < wh; k++) s += X[r][k] * $signed(8'(mem[256 + wa + k*ww + c]));
        end
        Y[r][c] = fin(s + b, relu);
        check(int'(dut.ofmap[r][c]) == Y[r][c],
              $sformatf("layer out [%0d][%0d] = %0d expected %0d", r, c, dut.ofmap[r][c], Y[r][c]));
      end
    expect_cyc = (conv ? yh : 1) * ((conv ? xw : xh) + 16) + 2;
    check(cyc == expect_cyc, $sformatf("systolic cycles %0d expected %0d", cyc, expect_cyc));
    op(S_SET_IFMAP_O, 0, cyc);
    check(int'($signed(res)) == Y[0][0], "set_ifmap_o result");
    foreach (X[r, c]) X[r][c] = 0;
    if (flat) begin
      for (int j = 0; j < yh * yw && j < 8; j++) X[0][j] = Y[j / yw][j % yw];
      xh = 1; xw = yh * yw > 8 ? 8 : yh * yw;
    end else begin
      for (int r = 0; r < yh; r++) for (int c = 0; c < yw; c++) X[r][c] = Y[r][c];
      xh = yh; xw = yw;
    end
  endtask

  initial begin
    board_t b;
    int cyc;
    foreach (cfg[i]) cfg[i] = 0;
    foreach (w_all[i]) begin w_all[i] = 0; b_all[i] = 0; end
    foreach (mem[i]) mem[i] = 0;
    b = start_board();
    b[20] = BQ; b[44] = WN;
    foreach (grid[i]) grid[i] = b[i];
    moves = '{'{6'd12, 6'd20}, '{6'd44, 6'd61}, '{6'd1, 6'd18}, '{6'd62, 6'd45}};
    cfg[0] = 8; cfg[1] = 8;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // move 1: white knight takes on f8, evaluated for black (side = 1)
    op(S_COMPUTE_GRID, 1, cyc);
    b[61] = b[44]; b[44] = 0;
    foreach (b[i]) check(dut.grid_work[i] == b[i], $sformatf("grid_work %0d", i));
    op(S_COMPUTE_IFMAP, 0, cyc);
    foreach (X[r, c]) begin
      automatic piece_t p = b[r*8 + c];
      automatic int vals [6] = '{1, 3, 3, 5, 9, 50};
      automatic int v = 0;
      for (int k = 0; k < 6; k++) if (p[k]) v = vals[k];
      X[r][c] = (p[6] == side) ? v : -v;
      check(int'(dut.ifmap[r][c]) == X[r][c], $sformatf("ifmap %0d %0d", r, c));
    end
    xh = 8; xw = 8;
    layer(3, 3, 0, 1, 1, 0, 1, 1, 0);     // 8x8 -> 6x6, leaky ReLU
    layer(2, 4, 9, 5, 3, 1, 0, 1, 0);     // 6x6 -> 5x3, full bias
    layer(4, 2, 17, 1, 1, 16, 1, 1, 1);   // 5x3 -> 2x2, flatten -> 1x4
    layer(4, 3, 25, 1, 3, 17, 0, 0, 0);   // 1x4 * 4x3 -> 1x3
    layer(3, 1, 40, 1, 1, 20, 0, 0, 0);   // 1x3 * 3x1 -> 1x1
    finish();
  end
endmodule
