// Push-button conditioning for the board's user interface (perform move, undo, run,
// scroll up, scroll down): a two-flop synchroniser per button, a debounce counter
// that accepts a new level only after it has been stable for DEBOUNCE cycles, and a
// one-cycle pulse on each accepted press. N buttons share one module.
// The buttons are named in the description; the conditioning is this design's choice.
module tt_buttons #(
  parameter int N        = 5,
  parameter int DEBOUNCE = 100000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] btn,
  output logic [N-1:0] press
);

  logic [N-1:0] s1, s2, level;
  logic [$clog2(DEBOUNCE+1)-1:0] cnt [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1    <= '0;
      s2    <= '0;
      level <= '0;
      press <= '0;
      for (int i = 0; i < N; i++) cnt[i] <= '0;
    end else begin
      s1    <= btn;
      s2    <= s1;
      press <= '0;
      for (int i = 0; i < N; i++) begin
        if (s2[i] == level[i]) begin
          cnt[i] <= '0;
        end else if (int'(cnt[i]) == DEBOUNCE - 1) begin
          cnt[i]   <= '0;
          level[i] <= s2[i];
          press[i] <= s2[i];
        end else begin
          cnt[i] <= cnt[i] + 1'b1;
        end
      end
    end
  end

endmodule
