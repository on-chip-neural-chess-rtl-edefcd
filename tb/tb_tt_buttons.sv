// tt_buttons with DEBOUNCE=20: bouncing presses and releases (random glitches shorter
// than the debounce time) must give exactly one press pulse per real press, delayed by
// the synchroniser plus the debounce time, and none for glitches or releases.
module tb_tt_buttons;
  localparam int WATCHDOG = 200000;
  localparam int N = 5, DB = 20;
  `include "tb_common.svh"
  logic rst_n = 1;
  initial #1 rst_n = 0;  // an asynchronous reset needs an edge after time 0
  logic [N-1:0] btn = 0, press;
  int n_press [N], n_real [N];
  int last_t [N];

  tt_buttons #(.N(N), .DEBOUNCE(DB)) dut (.*);

  int cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int i = 0; i < N; i++) if (press[i]) n_press[i]++;
  end

  task automatic bounce(int i, bit to, bit real_change);
    repeat ($urandom_range(0, 4)) begin
      btn[i] = to; repeat ($urandom_range(1, DB / 3)) @(negedge clk);
      btn[i] = !to; repeat ($urandom_range(1, DB / 3)) @(negedge clk);
    end
    if (real_change) begin
      btn[i] = to;
      repeat (DB + 4) @(negedge clk);
    end
  endtask

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 150; k++) begin
      automatic int i = $urandom_range(0, N - 1);
      automatic int n0 = n_press[i];
      bit glitch;
      glitch = $urandom_range(0, 3) == 0;
      if (glitch) begin
        bounce(i, 1, 0);
        btn[i] = 0;
        repeat (DB + 4) @(negedge clk);
        check(n_press[i] == n0, $sformatf("glitch on button %0d gave a pulse", i));
      end else begin
        // clean edge timing check on the first press of each button
        if (n_real[i] == 0) begin
          @(negedge clk); btn[i] = 1; t0 = cyc;
          while (!press[i]) @(negedge clk);
          check(cyc - t0 >= DB + 1 && cyc - t0 <= DB + 4, $sformatf("press delay %0d", cyc - t0));
          repeat (4) @(negedge clk);
        end else bounce(i, 1, 1);
        n_real[i]++;
        bounce(i, 0, 1);
        check(n_press[i] == n0 + 1, $sformatf("button %0d: one pulse per press", i));
      end
    end
    repeat (DB + 5) @(negedge clk);
    for (int i = 0; i < N; i++)
      check(n_press[i] == n_real[i], $sformatf("button %0d: %0d pulses for %0d presses", i, n_press[i], n_real[i]));
    finish();
  end
endmodule
