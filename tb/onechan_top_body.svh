// Shared body of the end-to-end testbenches. Expects a macro TOP_INST (the design
// instance header), localparams DEPTH, DEBOUNCE,
// CLK_DIV, MAX_CYCLES, N_SETUP and a move list setup_mv[N_SETUP] (player moves
// played before the search; an entry with from == to is an undo press instead).
  import onechan_pkg::*;
  import onechan_tb_pkg::*;

  logic        clk = 0;
  logic        rst_n = 1;
  initial #1 rst_n = 0;  // an asynchronous reset needs an edge after time 0
  logic [11:0] sw = '0;
  logic [4:0]  btn = '0;
  logic [13:0] led;
  logic [7:0]  an_n;
  logic [6:0]  seg_n;
  logic        dp_n;
  logic        prog_we = 0, mem_we = 0;
  logic [11:0] prog_addr = '0, mem_waddr = '0;
  logic [31:0] prog_data = '0, mem_wdata = '0;
  logic [11:0] tpu_pc;
  logic        tpu_pkt_err, tpu_res_valid;
  logic [7:0]  tpu_res_value, tpu_res_index;

  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters
  int n_down = 0, n_up = 0, n_spray = 0, n_packets = 0, n_poll_retry = 0;
  int n_capture = 0, n_stall = 0, n_tpu_results = 0, n_user_move = 0, n_user_undo = 0;
  int n_flatten = 0, n_scroll = 0, n_res_bad = 0, n_res_nonzero = 0;
  // traversal states: 0 idle, 3 push (step down), 4 up, 5 spray request, 8 poll
  logic [3:0] tst;
  assign tst = dut.u_tt.u_trav.state;
  always @(posedge clk) if (rst_n) begin
    if (tst == 4'd3) n_down++;
    if (tst == 4'd4) n_up++;
    if (tst == 4'd5) n_spray++;
    if (tst == 4'd3 && dut.u_tt.b_cap_out != 0) n_capture++;
    if (tst == 4'd8 && dut.u_tt.spi_done &&
        dut.u_tt.u_trav.bi == 3 && !dut.u_tt.u_trav.status_q) n_poll_retry++;
    if (dut.u_tpu.u_pkt.mtn_we) n_packets++;
    if (dut.u_tpu.u_core.eng_start) n_stall++;
    if (tpu_res_valid) begin
      automatic board_t g;
      automatic int ri, rv;
      n_tpu_results++;
      foreach (g[i]) g[i] = dut.u_tpu.u_pkt.grid[i];
      rv = leaf_value(g, dut.u_tpu.u_pkt.side, ri);
      if (rv != 0) n_res_nonzero++;
      if (int'(signed'(tpu_res_value)) != rv || int'(tpu_res_index) != ri) n_res_bad++;
    end
    if (dut.u_tt.u_board.user_move) n_user_move++;
    if (dut.u_tt.u_board.user_undo) n_user_undo++;
    if (dut.u_tpu.u_eng.start && dut.u_tpu.u_eng.code == S_SET_IFMAP_O && dut.u_tpu.u_eng.flat) n_flatten++;
    if (dut.u_tt.press[3] || dut.u_tt.press[4]) n_scroll++;
  end

  `TOP_INST dut (
    .clk_tt(clk), .clk_tpu(clk), .rst_n(rst_n), .sw(sw), .btn(btn), .led(led),
    .an_n(an_n), .seg_n(seg_n), .dp_n(dp_n),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .mem_we(mem_we), .mem_waddr(mem_waddr), .mem_wdata(mem_wdata),
    .tpu_pc(tpu_pc), .tpu_pkt_err(tpu_pkt_err), .tpu_res_valid(tpu_res_valid),
    .tpu_res_value(tpu_res_value), .tpu_res_index(tpu_res_index));

  task automatic press(int b);
    btn[b] = 1'b1;
    repeat (DEBOUNCE + 5) @(posedge clk);
    btn[b] = 1'b0;
    repeat (DEBOUNCE + 5) @(posedge clk);
  endtask

  initial begin : watchdog
    wait (cyc >= MAX_CYCLES);
    failures++;
    $display("FAIL: watchdog at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [31:0] prog[$];
    logic [31:0] mem[$];
    board_t b;
    move_t  hist[$];
    move_t  bm;
    bit     bf;
    int     ref_val;
    longint t0;

    tpu_program(prog);
    material_net(mem);
    // program and data are loaded while the design is held in reset
    foreach (prog[i]) begin
      @(negedge clk); prog_we = 1; prog_addr = 12'(i); prog_data = prog[i];
    end
    @(negedge clk); prog_we = 0;
    foreach (mem[i]) begin
      @(negedge clk); mem_we = 1; mem_waddr = 12'(i); mem_wdata = mem[i];
    end
    @(negedge clk); mem_we = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // player moves and undos
    b = start_board();
    for (int i = 0; i < N_SETUP; i++) begin
      if (setup_mv[i].from == setup_mv[i].to) begin
        void'(hist.pop_back());
        press(2);
        b = start_board();
        foreach (hist[j]) begin b[hist[j].to] = b[hist[j].from]; b[hist[j].from] = 0; end
      end else begin
        sw = {setup_mv[i].from, setup_mv[i].to};
        press(1);
        hist.push_back(setup_mv[i]);
        b[setup_mv[i].to] = b[setup_mv[i].from];
        b[setup_mv[i].from] = 0;
      end
    end
    foreach (b[s]) check(dut.u_tt.board[s] == b[s], $sformatf("board square %0d after setup", s));

    // display: scroll to row 1 and look at a digit
    press(3);
    check(dut.u_tt.row == 3'd1, "display scrolled to row 1");
    press(4);
    check(dut.u_tt.row == 3'd0, "display scrolled back to row 0");

    // search
    ref_val = negamax(b, DEPTH, bm, bf);
    t0 = cyc;
    press(0);
    wait (tst == 4'd0);
    $display("search took %0d cycles: %0d down, %0d up, %0d sprays, %0d packets",
             cyc - t0, n_down, n_up, n_spray, n_packets);
    check(led[12] == bf, "found flag");
    check(led[11:0] == {bm.from, bm.to}, $sformatf("best move %0d->%0d, expected %0d->%0d",
          led[11:6], led[5:0], bm.from, bm.to));
    check(int'(dut.u_tt.u_trav.best_value) == ref_val,
          $sformatf("best value %0d, expected %0d", dut.u_tt.u_trav.best_value, ref_val));
    foreach (b[s]) check(dut.u_tt.board[s] == b[s], $sformatf("board square %0d restored", s));
    check(tpu_pkt_err == 0, "no packet rejected");

    // every mechanism happened
    check(n_down > 0, "step down");
    check(n_up > 0, "step up");
    check(n_spray > 0, "spray");
    check(n_packets == n_spray, "one accepted packet per spray");
    check(n_tpu_results == n_packets, "one TPU result per packet");
    check(n_res_bad == 0, $sformatf("%0d TPU results differ from the reference leaf value", n_res_bad));
    check(n_res_nonzero > 0, "some leaf with a material imbalance");
    check(n_poll_retry > 0, "poll while TPU busy");
    check(n_capture > 0, "capture on the search board");
    check(n_stall > 0, "processor stall on a special instruction");
    check(n_flatten > 0, "flatten");
    check(n_user_move > 0, "player move");
    check(n_user_undo > 0, "player undo");
    check(n_scroll > 0, "display scroll");
    $display("mechanisms: down=%0d up=%0d spray=%0d packets=%0d poll_retry=%0d capture=%0d stall=%0d flatten=%0d user_move=%0d undo=%0d scroll=%0d",
             n_down, n_up, n_spray, n_packets, n_poll_retry, n_capture, n_stall, n_flatten,
             n_user_move, n_user_undo, n_scroll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (cyc % 10000000 == 0) $display("%0d: state %0d down %0d up %0d spray %0d pkts %0d res %0d pc %0d", cyc, tst, n_down, n_up, n_spray, n_packets, n_tpu_results, tpu_pc);
