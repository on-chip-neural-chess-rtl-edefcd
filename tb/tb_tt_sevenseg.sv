// tt_sevenseg with REFRESH=3: random boards; for many cycles the lit digit, its
// segments and decimal point must match the piece on the viewed row, with the digits
// scanned in turn; up/down pulses must move the row and stop at 0 and 7.
module tb_tt_sevenseg;
  import onechan_pkg::*;
  localparam int WATCHDOG = 200000;
  localparam int REFRESH = 3;
  `include "tb_common.svh"
  logic rst_n = 1;
  initial #1 rst_n = 0;  // an asynchronous reset needs an edge after time 0
  piece_t board [64];
  logic up = 0, down = 0;
  logic [2:0] row;
  logic [7:0] an_n;
  logic [6:0] seg_n;
  logic dp_n;
  int exp_row = 0;

  tt_sevenseg #(.REFRESH(REFRESH)) dut (.*);

  function automatic logic [6:0] font(int d);  // active-low {g..a}
    logic [6:0] on [7] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D};
    return ~on[d];
  endfunction

  initial begin
    logic [7:0] prev_an = 0;
    int scans = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      if (t % 20 == 0)
        for (int s = 0; s < 64; s++)
          board[s] = $urandom_range(0, 2) == 0 ? EMPTY
                   : piece_t'((8'd1 << $urandom_range(0, 5)) | ($urandom_range(0, 1) ? 8'h40 : 0));
      up = $urandom_range(0, 9) == 0;
      down = !up && $urandom_range(0, 9) == 0;
      @(negedge clk);
      if (up && exp_row < 7) exp_row++;
      else if (down && exp_row > 0) exp_row--;
      up = 0; down = 0;
      #1;
      check(int'(row) == exp_row, $sformatf("row %0d expected %0d", row, exp_row));
      check($countones(~an_n) == 1, "one digit lit");
      for (int d = 0; d < 8; d++) if (!an_n[d]) begin
        automatic piece_t p = board[exp_row * 8 + 7 - d];
        automatic int code = 0;
        for (int b = 0; b < 6; b++) if (p[b]) code = b + 1;
        check(seg_n == font(code), $sformatf("digit %0d segments %b for code %0d", d, seg_n, code));
        check(dp_n == !p[6], "decimal point for black");
      end
      if (an_n != prev_an) begin
        if (prev_an != 0) check(an_n == {an_n[6:0], an_n[7]} || an_n == {prev_an[6:0], prev_an[7]}, "digits scanned in turn");
        scans++;
      end
      prev_an = an_n;
    end
    check(scans > 50, "display refreshed");
    finish();
  end
endmodule
