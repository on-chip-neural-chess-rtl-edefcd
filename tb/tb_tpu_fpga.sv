// The TPU board on its own, driven over SPI by an spi_master at default parameters,
// with the evaluation program and the material network loaded during reset.
// Packets: the start position with five moves (the size of the evaluation packet in
// the description; the time from the last packet byte to the result is printed), random
// positions with five moves and with 1..40 moves, and broken packets (bad checksum,
// zero moves, square number out of range) that must be rejected without a result. The
// returned {flag, value, index} is compared with the best material over the packet's
// moves, seen by the side to move (first best move wins), saturated to 8 bits.
module tb_tpu_fpga;
  import onechan_pkg::*;
  import onechan_tb_pkg::*;
  localparam int WATCHDOG = 20000000;
  `include "tb_common.svh"
  logic rst_n = 1;
  initial #1 rst_n = 0;  // an asynchronous reset needs an edge after time 0
  logic sclk, mosi, miso, cs_n;
  logic prog_we = 0, mem_we = 0;
  logic [11:0] prog_addr = 0, mem_waddr = 0, pc;
  logic [31:0] prog_data = 0, mem_wdata = 0;
  logic pkt_err, res_valid;
  logic [7:0] res_value, res_index;
  logic m_start = 0, m_last = 0, m_done, m_busy;
  logic [7:0] m_tx = 0, m_rx;
  int n_err = 0, n_res = 0;
  longint cyc = 0, t_res = 0;

  tpu_fpga dut (.*);
  spi_master u_m (.clk, .rst_n, .start(m_start), .tx_byte(m_tx), .last(m_last),
    .rx_byte(m_rx), .done(m_done), .busy(m_busy), .sclk, .mosi, .miso, .cs_n);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && pkt_err) n_err++;
    if (rst_n && res_valid) begin n_res++; t_res = cyc; end
  end

  // one SPI transaction; returns the bytes read back
  task automatic xfer(input logic [7:0] tx [$], output logic [7:0] rx [$]);
    rx.delete();
    foreach (tx[i]) begin
      @(negedge clk);
      m_tx = tx[i]; m_last = (i == tx.size() - 1); m_start = 1;
      @(negedge clk); m_start = 0;
      while (!m_done) @(negedge clk);
      rx.push_back(m_rx);
    end
  endtask

  function automatic void make_packet(input board_t b, input bit side, input move_t mv [$],
                                      output logic [7:0] p [$]);
    logic [7:0] cs = 0;
    p.delete();
    p.push_back(PKT_SYNC); p.push_back({7'd0, side}); p.push_back(8'(mv.size()));
    foreach (b[s]) p.push_back(b[s]);
    foreach (mv[i]) begin p.push_back({2'b00, mv[i].from}); p.push_back({2'b00, mv[i].to}); end
    for (int i = 1; i < p.size(); i++) cs ^= p[i];
    p.push_back(cs);
  endfunction

  // best material over the given moves (first best wins), then saturated
  function automatic int best_of(input board_t b, input bit side, input move_t mv [$], output int idx);
    int best = -100000;
    idx = 0;
    foreach (mv[i]) begin
      board_t nb = b;
      int v;
      nb[mv[i].to] = nb[mv[i].from];
      nb[mv[i].from] = EMPTY;
      v = material(nb, side);
      if (v > best) begin best = v; idx = i; end
    end
    return sat8(best);
  endfunction

  // send one packet, poll for the answer, compare
  task automatic run_packet(input board_t b, input bit side, input move_t mv [$], input bit report);
    logic [7:0] p [$], rx [$];
    logic [7:0] poll [$] = '{RD_CMD, 8'h00, 8'h00, 8'h00};
    int idx, v, polls = 0;
    longint t_sent;
    make_packet(b, side, mv, p);
    v = best_of(b, side, mv, idx);
    xfer(p, rx);
    while (m_busy) @(negedge clk);
    t_sent = cyc;
    do begin
      xfer(poll, rx);
      polls++;
    end while (rx[1][0] == 1'b0 && polls < 2000);
    check(rx[1] == 8'h01, "result flag set");
    check(int'(signed'(rx[2])) == v && int'(rx[3]) == idx,
          $sformatf("value %0d index %0d, expected %0d %0d", signed'(rx[2]), rx[3], v, idx));
    if (report)
      $display("%0d-move packet: result %0d cycles after the last packet byte (%0d polls)",
               mv.size(), t_res - t_sent, polls);
  endtask

  function automatic piece_t rand_piece();
    return piece_t'((8'd1 << $urandom_range(0, 5)) | ($urandom_range(0, 1) ? 8'h40 : 8'h00));
  endfunction

  initial begin
    logic [31:0] prog [$], mem [$];
    logic [7:0] p [$], rx [$];
    board_t b;
    move_t l [$], mv [$];
    int res0;
    tpu_program(prog);
    material_net(mem);
    repeat (2) @(posedge clk);
    foreach (prog[i]) begin @(negedge clk); prog_we = 1; prog_addr = 12'(i); prog_data = prog[i]; end
    @(negedge clk); prog_we = 0;
    foreach (mem[i]) begin @(negedge clk); mem_we = 1; mem_waddr = 12'(i); mem_wdata = mem[i]; end
    @(negedge clk); mem_we = 0;
    rst_n = 1;
    repeat (10) @(negedge clk);
    check(pc == 0, "program waits for a packet");

    // start position, five moves
    b = start_board();
    ref_moves(b, 0, l);
    mv = l[0:4];
    run_packet(b, 0, mv, 1);

    // random positions, five moves and 1..40 moves, both sides
    for (int t = 0; t < 16; t++) begin
      bit side = t[0];
      do begin
        foreach (b[s]) b[s] = ($urandom_range(0, 99) < 40) ? rand_piece() : EMPTY;
        ref_moves(b, side, l);
      end while (l.size() < 5);
      l.shuffle();
      mv.delete();
      for (int i = 0; i < ((t < 8) ? 5 : $urandom_range(1, l.size() < 40 ? l.size() : 40)); i++)
        mv.push_back(l[i]);
      run_packet(b, side, mv, t < 8);
    end

    // broken packets: no result, one error pulse each, program keeps waiting
    res0 = n_res;
    make_packet(b, 0, mv, p); p[p.size() - 1] ^= 8'h01;           xfer(p, rx);
    mv.delete(); make_packet(b, 0, mv, p);                         xfer(p, rx);
    mv.push_back('{from: 6'd0, to: 6'd1}); make_packet(b, 0, mv, p);
    p[67] = 8'd64; p[p.size() - 1] ^= 8'd64;                       xfer(p, rx);
    repeat (2000) @(negedge clk);
    check(n_err == 3, $sformatf("%0d packets rejected, expected 3", n_err));
    check(n_res == res0, "no result from a rejected packet");
    check(pc == 0, "program still waiting");
    finish();
  end
endmodule
