// Step-step-spray tree traversal with negamax on a move stack.
//
// The search walks the move tree depth first. In the step phase it asks the move
// generator for one move of the current node (step), pushes it on the stack and plays
// it on the board (step down), or, when the node has no move left, takes the top move
// back and pops it (step up). When the stack holds DEPTH moves the node is a leaf:
// the spray phase asks the generator for all moves of the leaf (spray), sends the
// leaf board and those moves to the TPU in one SPI packet, and polls the TPU until it
// answers with the best value over those moves, seen by the side to move at the leaf.
// That value is stored as the leaf's result.
//
// Negamax runs on the stack: every node keeps best = max over its children of
// (-child value), starting at NEG_INF, which is also the value of a node without
// moves. On a step up the popped node's best updates its parent. At the root the move
// that set the best value is best_move. The root side is always white; depth d is
// played by white when d is even.
//
// Each node stores where the generator stopped (from square and candidate index) so
// the next step resumes after the last move returned. Handshakes: start pulse; busy
// high until the done pulse; best_move/best_value/found are held from done on.
// Packet framing and polling are described in onechan_pkg. The three phases, the
// stack discipline and the TPU packet follow the description; the packet format, the
// polling, NEG_INF and the value width are this design's choices.
module tt_traversal
  import onechan_pkg::*;
#(
  parameter int DEPTH     = 3,
  parameter int MAX_MOVES = 128,
  parameter int VAL_W     = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output move_t       best_move,
  output logic signed [VAL_W-1:0] best_value,
  output logic        found,
  // board
  input  piece_t      board [64],
  output logic        b_apply,
  output logic        b_undo,
  output move_t       b_mv,
  output piece_t      b_cap_in,
  input  piece_t      b_cap_out,
  // move generator
  output logic        mg_step,
  output logic        mg_spray,
  output logic        mg_side,
  output sq_t         mg_from,
  output logic [4:0]  mg_idx,
  input  logic        mg_valid,
  input  move_t       mg_mv,
  input  logic [4:0]  mg_mv_idx,
  input  logic        mg_done,
  input  logic        mg_none,
  // SPI master
  output logic        spi_start,
  output logic [7:0]  spi_tx,
  output logic        spi_last,
  input  logic [7:0]  spi_rx,
  input  logic        spi_done
);

  localparam int SPW = $clog2(DEPTH + 1);
  localparam int NW  = $clog2(MAX_MOVES + 1);
  typedef logic signed [VAL_W-1:0] val_t;

  typedef enum logic [3:0] {
    IDLE, STEP_REQ, STEP_WAIT, PUSH, UP, SPRAY_REQ, SPRAY_WAIT, SEND, POLL, GOTVAL
  } state_e;
  state_e state;

  logic [SPW-1:0] sp;
  move_t       st_mv   [DEPTH+1];
  piece_t      st_cap  [DEPTH+1];
  sq_t         res_from[DEPTH+1];
  logic [4:0]  res_idx [DEPTH+1];
  val_t        best    [DEPTH+1];

  move_t       mbuf [MAX_MOVES];
  logic [NW-1:0] nmov;
  localparam int IW  = $clog2(MAX_MOVES);
  logic [9:0]  bi;          // byte index within the current SPI transaction
  logic        wait_spi;
  logic [7:0]  csum;
  logic        status_q;
  logic [7:0]  value_q;
  logic [9:0]  pkt_len;     // index of the checksum byte
  logic [7:0]  tx_b;
  val_t        child_neg;
  logic [9:0]  mj;

  assign busy      = (state != IDLE);
  assign mg_side   = sp[0];
  assign b_mv      = (state == UP) ? st_mv[sp] : st_mv[SPW'(sp + 1'b1)];
  assign b_cap_in  = st_cap[sp];
  assign b_apply   = (state == PUSH);
  assign b_undo    = (state == UP);
  assign pkt_len   = 10'd67 + 10'(2 * int'(nmov));
  assign child_neg = -best[sp];
  assign mj        = bi - 10'd67;

  // Byte to send in the current transaction
  always_comb begin
    tx_b = 8'h00;
    if (state == SEND) begin
      if (bi == 0)            tx_b = PKT_SYNC;
      else if (bi == 1)       tx_b = {7'd0, sp[0]};
      else if (bi == 2)       tx_b = 8'(nmov);
      else if (bi < 67)       tx_b = board[6'(bi - 10'd3)];
      else if (bi < pkt_len)  tx_b = mj[0] ? {2'b00, mbuf[IW'(mj >> 1)].to} : {2'b00, mbuf[IW'(mj >> 1)].from};
      else                    tx_b = csum;
    end else if (state == POLL) begin
      tx_b = (bi == 0) ? RD_CMD : 8'h00;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      sp        <= '0;
      done      <= 1'b0;
      best_move <= '0;
      best_value <= '0;
      found     <= 1'b0;
      mg_step   <= 1'b0;
      mg_spray  <= 1'b0;
      mg_from   <= '0;
      mg_idx    <= '0;
      spi_start <= 1'b0;
      spi_tx    <= '0;
      spi_last  <= 1'b0;
      nmov      <= '0;
      bi        <= '0;
      wait_spi  <= 1'b0;
      csum      <= '0;
      status_q  <= '0;
      value_q   <= '0;
      for (int i = 0; i <= DEPTH; i++) begin
        st_mv[i] <= '0; st_cap[i] <= '0; res_from[i] <= '0; res_idx[i] <= '0; best[i] <= '0;
      end
    end else begin
      done      <= 1'b0;
      mg_step   <= 1'b0;
      mg_spray  <= 1'b0;
      spi_start <= 1'b0;
      case (state)
        IDLE: if (start) begin
          sp          <= '0;
          best[0]     <= val_t'(NEG_INF);
          res_from[0] <= '0;
          res_idx[0]  <= '0;
          found       <= 1'b0;
          state       <= STEP_REQ;
        end
        STEP_REQ: begin
          mg_step <= 1'b1;
          mg_from <= res_from[sp];
          mg_idx  <= res_idx[sp];
          state   <= STEP_WAIT;
        end
        STEP_WAIT: if (mg_done) begin
          if (mg_none || !mg_valid) begin
            if (sp == 0) begin
              best_value <= best[0];
              done       <= 1'b1;
              state      <= IDLE;
            end else begin
              state <= UP;
            end
          end else begin
            st_mv[SPW'(sp + 1'b1)] <= mg_mv;
            res_from[sp]           <= mg_mv.from;
            res_idx[sp]            <= mg_mv_idx + 5'd1;
            state                  <= PUSH;
          end
        end
        PUSH: begin   // board plays the move this cycle
          st_cap[SPW'(sp + 1'b1)]   <= b_cap_out;
          best[SPW'(sp + 1'b1)]     <= val_t'(NEG_INF);
          res_from[SPW'(sp + 1'b1)] <= '0;
          res_idx[SPW'(sp + 1'b1)]  <= '0;
          sp                        <= sp + 1'b1;
          state <= (int'(sp) + 1 == DEPTH) ? SPRAY_REQ : STEP_REQ;
        end
        UP: begin     // board takes the move back this cycle
          if (child_neg > best[SPW'(sp - 1'b1)]) begin
            best[SPW'(sp - 1'b1)] <= child_neg;
            if (sp == 1) begin
              best_move <= st_mv[1];
              found     <= 1'b1;
            end
          end
          sp    <= sp - 1'b1;
          state <= STEP_REQ;
        end
        SPRAY_REQ: begin
          mg_spray <= 1'b1;
          mg_from  <= '0;
          mg_idx   <= '0;
          nmov     <= '0;
          state    <= SPRAY_WAIT;
        end
        SPRAY_WAIT: begin
          if (mg_valid && int'(nmov) < MAX_MOVES) begin
            mbuf[IW'(nmov)] <= mg_mv;
            nmov <= nmov + 1'b1;
          end
          if (mg_done) begin
            if (nmov == 0 && !mg_valid) begin
              best[sp] <= val_t'(NEG_INF);
              state    <= UP;
            end else begin
              bi       <= '0;
              csum     <= '0;
              wait_spi <= 1'b0;
              state    <= SEND;
            end
          end
        end
        SEND: begin
          if (!wait_spi) begin
            spi_start <= 1'b1;
            spi_tx    <= tx_b;
            spi_last  <= (bi == pkt_len);
            wait_spi  <= 1'b1;
            if (bi != 0) csum <= csum ^ tx_b;
          end else if (spi_done) begin
            wait_spi <= 1'b0;
            bi       <= bi + 1'b1;
            if (bi == pkt_len) begin
              bi    <= '0;
              state <= POLL;
            end
          end
        end
        POLL: begin
          if (!wait_spi) begin
            spi_start <= 1'b1;
            spi_tx    <= tx_b;
            spi_last  <= (bi == 3);
            wait_spi  <= 1'b1;
          end else if (spi_done) begin
            wait_spi <= 1'b0;
            bi       <= bi + 1'b1;
            if (bi == 1) status_q <= spi_rx[0];
            if (bi == 2) value_q  <= spi_rx;
            if (bi == 3) begin
              bi    <= '0;
              state <= status_q ? GOTVAL : POLL;
            end
          end
        end
        GOTVAL: begin
          best[sp] <= val_t'(signed'(value_q));
          state    <= UP;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
