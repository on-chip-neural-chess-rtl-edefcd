// tpu_packet_rx driven at byte level: a valid packet (grid, moves, count, side), a
// packet with a bad checksum and one with a square out of range (both rejected,
// count not written), and the polled answer before and after a result.
module tb_tpu_packet_rx;
  import onechan_pkg::*;
  localparam int WATCHDOG = 100000;
  `include "tb_common.svh"
  logic rst_n = 1, sel = 0, rx_valid = 0, side, mtn_we, pkt_err;
  initial #1 rst_n = 0;  // an asynchronous reset needs an edge after time 0
  logic res_valid = 0;
  logic [7:0] rx_byte = 0, tx_byte, res_value = 0, res_index = 0;
  piece_t grid [64];
  logic [6:0] mv_idx = 0;
  move_t mv;
  logic [31:0] mtn;
  int n_mtn = 0, n_err = 0;
  tpu_packet_rx dut (.*);
  always @(posedge clk) if (rst_n) begin
    if (mtn_we) n_mtn++;
    if (pkt_err) n_err++;
  end

  task automatic transaction(input logic [7:0] bytes [$], output logic [7:0] answers [$]);
    answers.delete();
    @(negedge clk); sel = 1; @(negedge clk); sel = 0;
    foreach (bytes[i]) begin
      repeat (3) @(negedge clk);
      answers.push_back(tx_byte);   // byte the slave would shift out for index i
      rx_byte = bytes[i]; rx_valid = 1; @(negedge clk); rx_valid = 0;
    end
    repeat (3) @(negedge clk);
  endtask

  function automatic void build(int n, bit sd, bit bad_sum, bit bad_sq, ref logic [7:0] p [$],
                                ref piece_t g [64], ref move_t ms [$]);
    logic [7:0] cs = 0;
    p.delete(); ms.delete();
    p.push_back(PKT_SYNC); p.push_back({7'd0, sd}); p.push_back(8'(n));
    foreach (g[i]) begin g[i] = 8'($urandom); p.push_back(g[i]); end
    for (int i = 0; i < n; i++) begin
      move_t m = '{from: 6'($urandom), to: 6'($urandom)};
      ms.push_back(m);
      p.push_back({2'b00, m.from});
      p.push_back((bad_sq && i == n - 1) ? 8'hC0 : {2'b00, m.to});
    end
    for (int i = 1; i < p.size(); i++) cs ^= p[i];
    p.push_back(bad_sum ? ~cs : cs);
  endfunction

  initial begin
    logic [7:0] p [$], ans [$];
    piece_t g [64];
    move_t ms [$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // valid packet, 37 moves, black to move
    build(37, 1, 0, 0, p, g, ms);
    transaction(p, ans);
    check(n_mtn == 1 && mtn == 37 && n_err == 0, $sformatf("count written (%0d, %0d)", n_mtn, mtn));
    check(side == 1, "side");
    foreach (g[i]) check(grid[i] == g[i], $sformatf("grid %0d", i));
    foreach (ms[i]) begin mv_idx = 7'(i); #1; check(mv == ms[i], $sformatf("move %0d", i)); end
    // poll before a result: flag clear
    transaction('{RD_CMD, 8'h00, 8'h00, 8'h00}, ans);
    check(ans[1] == 8'h00, "not ready");
    // result
    @(negedge clk); res_valid = 1; res_value = 8'hD6; res_index = 8'd12; @(negedge clk); res_valid = 0;
    transaction('{RD_CMD, 8'h00, 8'h00, 8'h00}, ans);
    check(ans[1] == 8'h01 && ans[2] == 8'hD6 && ans[3] == 8'd12, "answer bytes");
    // bad checksum and bad square: rejected
    build(5, 0, 1, 0, p, g, ms);
    transaction(p, ans);
    build(5, 0, 0, 1, p, g, ms);
    transaction(p, ans);
    check(n_mtn == 1 && n_err == 2, "bad packets rejected");
    // a new valid packet clears the result flag
    build(1, 0, 0, 0, p, g, ms);
    transaction(p, ans);
    check(n_mtn == 2 && mtn == 1 && side == 0, "second packet");
    transaction('{RD_CMD, 8'h00, 8'h00, 8'h00}, ans);
    check(ans[1] == 8'h00, "flag cleared by new packet");
    finish();
  end
endmodule
