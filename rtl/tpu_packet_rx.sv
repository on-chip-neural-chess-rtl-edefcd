// Packet receiver of the tiny TPU, behind the SPI slave.
//
// A transaction whose first byte is PKT_SYNC carries a search leaf: side to move,
// move count N, the 64 grid bytes, N {from, to} move pairs and an XOR checksum of all
// bytes after the sync byte. Grid bytes go into the grid RAM and move pairs into the
// move stack as they arrive. The packet is accepted only if 1 <= N <= MAX_MOVES,
// every square number is below 64, the checksum matches and the length is right; then
// mtn_we writes N into the move-count register, which starts the program, and the
// result flag is cleared. A rejected packet only pulses pkt_err.
// Any transaction answers, in bytes 1, 2 and 3, the result flag, the best value and
// the index of the best move, latched from the core's res_valid pulse; the traversal
// FPGA polls with an RD_CMD transaction until the flag is set.
// Checking the packet, the grid RAM, the move stack and loading the move count follow
// the description; the framing and the polled answer are this design's choices.
module tpu_packet_rx
  import onechan_pkg::*;
#(
  parameter int MAX_MOVES = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel,
  input  logic        rx_valid,
  input  logic [7:0]  rx_byte,
  output logic [7:0]  tx_byte,
  output piece_t      grid [64],
  output logic        side,
  input  logic [$clog2(MAX_MOVES)-1:0] mv_idx,
  output move_t       mv,
  output logic        mtn_we,
  output logic [31:0] mtn,
  output logic        pkt_err,
  input  logic        res_valid,
  input  logic [7:0]  res_value,
  input  logic [7:0]  res_index
);

  localparam int IW = $clog2(MAX_MOVES);

  move_t       mstack [MAX_MOVES];
  logic [9:0]  bidx;
  logic        is_pkt, bad;
  logic [7:0]  csum, cnt;
  logic        side_q;
  logic        ready;
  logic [7:0]  value_q, index_q;
  logic [9:0]  last_idx;
  logic [9:0]  mj;

  assign last_idx = 10'd67 + {1'b0, cnt, 1'b0};
  assign mj       = bidx - 10'd67;
  assign mv       = mstack[mv_idx];

  always_comb begin
    case (bidx)
      10'd1:   tx_byte = {7'd0, ready};
      10'd2:   tx_byte = value_q;
      10'd3:   tx_byte = index_q;
      default: tx_byte = 8'h00;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bidx    <= '0;
      is_pkt  <= 1'b0;
      bad     <= 1'b0;
      csum    <= '0;
      cnt     <= '0;
      side_q  <= 1'b0;
      side    <= 1'b0;
      ready   <= 1'b0;
      value_q <= '0;
      index_q <= '0;
      mtn_we  <= 1'b0;
      mtn     <= '0;
      pkt_err <= 1'b0;
      for (int i = 0; i < 64; i++) grid[i] <= EMPTY;
    end else begin
      mtn_we  <= 1'b0;
      pkt_err <= 1'b0;
      if (res_valid) begin
        ready   <= 1'b1;
        value_q <= res_value;
        index_q <= res_index;
      end
      if (sel) begin
        bidx   <= '0;
        is_pkt <= 1'b0;
        bad    <= 1'b0;
        csum   <= '0;
      end else if (rx_valid) begin
        bidx <= bidx + 1'b1;
        if (bidx != 0) csum <= csum ^ rx_byte;
        if (bidx == 0) begin
          is_pkt <= (rx_byte == PKT_SYNC);
        end else if (is_pkt) begin
          if (bidx == 1) begin
            side_q <= rx_byte[0];
          end else if (bidx == 2) begin
            cnt <= rx_byte;
            if (rx_byte == 0 || int'(rx_byte) > MAX_MOVES) bad <= 1'b1;
          end else if (bidx < 67) begin
            grid[6'(bidx - 10'd3)] <= rx_byte;
          end else if (bidx < last_idx) begin
            if (rx_byte[7:6] != 2'b00) bad <= 1'b1;
            if (mj[0]) mstack[IW'(mj >> 1)].to   <= rx_byte[5:0];
            else       mstack[IW'(mj >> 1)].from <= rx_byte[5:0];
          end else if (bidx == last_idx) begin
            if (!bad && rx_byte == csum) begin
              mtn_we <= 1'b1;
              mtn    <= {24'd0, cnt};
              side   <= side_q;
              ready  <= 1'b0;
            end else begin
              pkt_err <= 1'b1;
            end
          end else begin
            pkt_err <= 1'b1;   // longer than announced
          end
        end
      end
    end
  end

endmodule
