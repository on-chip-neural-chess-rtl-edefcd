// Layer engine of the tiny TPU: carries out the multi-cycle special instructions and
// holds the feature maps, the systolic array and the accumulator.
//
// Operations (start pulse with code; done pulses when finished, 1 cycle for the
// single-cycle ones):
//   compute_grid      grid_work = received grid with move number opnd played on it
//   compute_ifmap     ifmap[r][c] = material value of grid_work square (r,c), positive
//                     for the side to move, negative for the opponent; the map size is
//                     taken from the input height/width registers
//   send_layer_info   latch the decoded layer record (registers 23..31)
//   load_weight       copy wh*ww weights from main memory 0x100+waddr.. into register
//                     group 1 (one per cycle), then load all 64 into the array at once;
//                     for a convolution each kernel row is stored horizontally flipped
//   load_bias         copy bh*bw biases from 0x200+baddr.. into group 2
//   send_systolic_data run the layer:
//       matrix multiply  Y(ih x ww) = X(ih x wh) * W(wh x ww) + B: row i of X enters
//                        the array as one vector; one pass of ih+ROWS+COLS cycles
//       convolution      valid 2-D correlation, Y((ih-wh+1) x (iw-ww+1)): output row r
//                        feeds input rows r..r+wh-1 column by column; the column sums of
//                        the flipped kernel give one output pixel per cycle; one pass of
//                        iw+ROWS+COLS cycles per output row
//       bias B is bh x bw, broadcast along a dimension of size 1; optional leaky ReLU
//   set_ifmap_o       ifmap = ofmap (flattened into one row of at most 8 values when the
//                     layer's flatten flag is set); res = ofmap[0][0]
// Weight-stationary array, flipped kernel, column sums for convolution and the layer
// record fields follow the description; material values, bias broadcast, the flatten
// limit and the timing are this design's choices.
module tpu_layer_engine
  import onechan_pkg::*;
#(
  parameter int ROWS      = 8,
  parameter int COLS      = 8,
  parameter int ACT_W     = 16,
  parameter int WGT_W     = 8,
  parameter int ACC_W     = 32,
  parameter int MAX_MOVES = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  special_e    code,
  input  logic [31:0] opnd,
  output logic        done,
  output logic [31:0] res,
  // packet data
  input  piece_t      grid [64],
  input  logic        side,
  output logic [$clog2(MAX_MOVES)-1:0] mv_idx,
  input  move_t       mv,
  // register file
  input  logic [31:0] cfg   [12],
  input  logic [31:0] w_all [64],
  input  logic [31:0] b_all [64],
  output logic        rf_we,
  output logic [1:0]  rf_group,
  output logic [5:0]  rf_addr,
  output logic [31:0] rf_data,
  // main memory
  output logic [11:0] mem_addr,
  input  logic [31:0] mem_data,
  // observation
  output logic        busy
);

  typedef logic signed [ACT_W-1:0] act_t;
  typedef enum logic [2:0] {E_IDLE, E_LOADW, E_WLOAD, E_LOADB, E_SYS, E_DONE} estate_e;
  localparam int TW = $clog2(8 + ROWS + COLS + 1);

  estate_e state;
  piece_t  grid_work [64];
  act_t    ifmap [8][8];
  act_t    ofmap [8][8];
  logic [3:0] ih, iw, oh, ow;
  logic [3:0] wh, ww, bh, bw;
  logic [7:0] waddr, baddr;
  logic       relu, op_conv, flat;
  logic [6:0] cnt;
  logic [3:0] pass;
  logic [TW-1:0] t;

  act_t                   vec      [ROWS];
  act_t                   fvec     [ROWS];
  logic signed [WGT_W-1:0] w_arr   [ROWS][COLS];
  logic signed [ACC_W-1:0] col_out [COLS];
  act_t                   bias_vec [COLS];
  act_t                   bias_conv;
  act_t                   mm_out   [COLS];
  act_t                   conv_out;
  logic                   w_load;
  logic [3:0]             passes, tin;
  logic signed [TW:0]     cap_i;   // output index captured this cycle

  assign mv_idx = $clog2(MAX_MOVES)'(opnd);
  assign busy   = (state != E_IDLE);
  assign w_load = (state == E_WLOAD);

  function automatic logic [3:0] clamp8(logic [31:0] v);
    return (v > 32'd8) ? 4'd8 : v[3:0];
  endfunction

  function automatic act_t bias_at(int i, int j);
    int bi = (bh == 4'd1) ? 0 : i;
    int bj = (bw == 4'd1) ? 0 : j;
    return act_t'(b_all[(bi * int'(bw) + bj) % 64]);
  endfunction

  // ---- systolic datapath ----
  always_comb begin
    passes = op_conv ? 4'(ih - wh + 1'b1) : 4'd1;
    tin    = op_conv ? iw : ih;
    for (int k = 0; k < ROWS; k++) begin
      vec[k] = '0;
      if (state == E_SYS && 32'(t) < 32'(tin) && k < 8) begin
        if (op_conv) begin
          if (k < int'(wh) && int'(pass) + k < 8) vec[k] = ifmap[int'(pass) + k][t[2:0]];
        end else begin
          if (k < int'(iw)) vec[k] = ifmap[t[2:0]][k];
        end
      end
    end
    for (int k = 0; k < ROWS; k++)
      for (int n = 0; n < COLS; n++) begin
        w_arr[k][n] = '0;
        if (k < int'(wh) && n < int'(ww))
          w_arr[k][n] = WGT_W'(w_all[(k * int'(ww) + (op_conv ? int'(ww) - 1 - n : n)) % 64]);
      end
    cap_i = op_conv ? (TW+1)'(signed'({1'b0, t}) - (TW+1)'(ROWS) - (TW+1)'(ww) + 1'sd1)
                    : (TW+1)'(signed'({1'b0, t}) - (TW+1)'(ROWS + COLS - 1));
    for (int n = 0; n < COLS; n++) bias_vec[n] = bias_at(int'(cap_i[2:0]), n);
    bias_conv = bias_at(int'(pass), int'(cap_i[2:0]));
  end

  tpu_systolic_feeder #(.ROWS(ROWS), .ACT_W(ACT_W)) u_feed (
    .clk(clk), .rst_n(rst_n), .vec_in(vec), .vec_out(fvec));

  tpu_systolic_array #(.ROWS(ROWS), .COLS(COLS), .ACT_W(ACT_W), .WGT_W(WGT_W), .ACC_W(ACC_W)) u_array (
    .clk(clk), .rst_n(rst_n), .w_load(w_load), .w_in(w_arr), .a_in(fvec), .col_out(col_out));

  tpu_accumulator #(.COLS(COLS), .ACT_W(ACT_W), .ACC_W(ACC_W)) u_acc (
    .clk(clk), .rst_n(rst_n), .col_in(col_out), .bias_vec(bias_vec), .bias_conv(bias_conv),
    .relu(relu), .mm_out(mm_out), .conv_out(conv_out));

  // ---- memory / register-file loader ----
  always_comb begin
    mem_addr = (state == E_LOADB) ? MEM_BIAS + 12'(baddr) + 12'(cnt)
                                  : MEM_WEIGHT + 12'(waddr) + 12'(cnt);
    rf_we    = (state == E_LOADW) || (state == E_LOADB);
    rf_group = (state == E_LOADB) ? 2'd2 : 2'd1;
    rf_addr  = cnt[5:0];
    rf_data  = mem_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= E_IDLE;
      done  <= 1'b0;
      res   <= '0;
      ih <= 4'd8; iw <= 4'd8; oh <= '0; ow <= '0;
      wh <= 4'd1; ww <= 4'd1; bh <= 4'd1; bw <= 4'd1;
      waddr <= '0; baddr <= '0; relu <= 1'b0; op_conv <= 1'b0; flat <= 1'b0;
      cnt <= '0; pass <= '0; t <= '0;
      for (int i = 0; i < 64; i++) grid_work[i] <= EMPTY;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin ifmap[r][c] <= '0; ofmap[r][c] <= '0; end
    end else begin
      done <= 1'b0;
      case (state)
        E_IDLE: if (start) begin
          state <= E_DONE;
          cnt   <= '0;
          case (code)
            S_COMPUTE_GRID: begin
              for (int i = 0; i < 64; i++) grid_work[i] <= grid[i];
              grid_work[mv.to]   <= grid[mv.from];
              grid_work[mv.from] <= EMPTY;
            end
            S_COMPUTE_IFMAP: begin
              ih <= clamp8(cfg[0]);
              iw <= clamp8(cfg[1]);
              for (int r = 0; r < 8; r++)
                for (int c = 0; c < 8; c++) begin
                  automatic piece_t p = grid_work[r*8 + c];
                  automatic int v = piece_value(p);
                  ifmap[r][c] <= act_t'((p[P_BLACK] == side) ? v : -v);
                end
            end
            S_SEND_LAYER_INFO: begin
              wh <= clamp8(cfg[3]);  ww <= clamp8(cfg[4]);  waddr <= cfg[5][7:0];
              bh <= clamp8(cfg[6]);  bw <= clamp8(cfg[7]);  baddr <= cfg[8][7:0];
              relu <= cfg[9][0]; op_conv <= cfg[10][0]; flat <= cfg[11][0];
            end
            S_LOAD_WEIGHT: state <= E_LOADW;
            S_LOAD_BIAS:   state <= E_LOADB;
            S_SEND_SYSTOLIC: begin
              state <= E_SYS;
              pass  <= '0;
              t     <= '0;
              oh    <= op_conv ? 4'(ih - wh + 1'b1) : ih;
              ow    <= op_conv ? 4'(iw - ww + 1'b1) : ww;
              for (int r = 0; r < 8; r++)
                for (int c = 0; c < 8; c++) ofmap[r][c] <= '0;
            end
            S_SET_IFMAP_O: begin
              res <= 32'(ofmap[0][0]);
              if (flat) begin
                for (int j = 0; j < 8; j++) begin
                  ifmap[0][j] <= (j < int'(oh) * int'(ow)) ? ofmap[j / int'(ow)][j % int'(ow)] : '0;
                  for (int r = 1; r < 8; r++) ifmap[r][j] <= '0;
                end
                ih <= 4'd1;
                iw <= (int'(oh) * int'(ow) > 8) ? 4'd8 : 4'(int'(oh) * int'(ow));
              end else begin
                ifmap <= ofmap;
                ih    <= oh;
                iw    <= ow;
              end
            end
            default: ;
          endcase
        end
        E_LOADW: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) + 1 >= int'(wh) * int'(ww)) state <= E_WLOAD;
        end
        E_WLOAD: state <= E_DONE;
        E_LOADB: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) + 1 >= int'(bh) * int'(bw)) state <= E_DONE;
        end
        E_SYS: begin
          // capture outputs of the current pass
          if (cap_i >= 0) begin
            if (op_conv) begin
              if (cap_i < signed'({1'b0, ow}) && pass < 4'd8)
                ofmap[pass[2:0]][cap_i[2:0]] <= conv_out;
            end else if (cap_i < signed'({1'b0, ih})) begin
              for (int n = 0; n < COLS; n++)
                if (n < int'(ww) && n < 8) ofmap[cap_i[2:0]][n] <= mm_out[n];
            end
          end
          if (int'(t) == int'(tin) + ROWS + COLS - 1) begin
            t <= '0;
            if (pass + 1'b1 >= passes) state <= E_DONE;
            else pass <= pass + 1'b1;
          end else begin
            t <= t + 1'b1;
          end
        end
        E_DONE: begin
          done  <= 1'b1;
          state <= E_IDLE;
        end
        default: state <= E_IDLE;
      endcase
    end
  end

endmodule
