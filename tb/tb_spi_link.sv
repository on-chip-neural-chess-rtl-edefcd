// spi_master and spi_slave joined as on the board (shared clock here). Random
// transactions of 1..6 bytes: an independent bus monitor samples MOSI and MISO on
// every rising SCLK edge and checks mode 0 (SCLK low while CS_N is high, MOSI steady
// while SCLK is high) and the byte timing; the slave answers each byte with the
// previous received byte + 1 (first byte 5A), which the master must read back.
module tb_spi_link;
  localparam int WATCHDOG = 400000;
  localparam int CLK_DIV  = 8;
  `include "tb_common.svh"
  logic rst_n = 1;
  initial #1 rst_n = 0;  // an asynchronous reset needs an edge after time 0
  logic start = 0, last = 0, done, busy, sclk, mosi, miso, cs_n, sel, rx_valid;
  logic [7:0] tx_byte = 0, rx_byte, s_tx = 8'h5A, s_rx;

  spi_master #(.CLK_DIV(CLK_DIV)) u_m (.clk, .rst_n, .start, .tx_byte, .last, .rx_byte,
    .done, .busy, .sclk, .mosi, .miso, .cs_n);
  spi_slave u_s (.clk, .rst_n, .sclk, .mosi, .cs_n, .miso, .tx_byte(s_tx), .sel,
    .rx_byte(s_rx), .rx_valid);

  // slave-side responder
  always @(posedge clk) begin
    if (cs_n) s_tx <= 8'h5A;
    else if (rx_valid) s_tx <= s_rx + 8'd1;
  end

  // bus monitor
  logic [7:0] mon_mosi = 0, mon_miso = 0;
  int mon_bits = 0, n_sel = 0, n_rxv = 0, sclk_bad = 0, mosi_bad = 0;
  logic [7:0] mon_q [$], slave_q [$];
  always @(posedge sclk) begin
    mon_mosi = {mon_mosi[6:0], mosi};
    mon_miso = {mon_miso[6:0], miso};
    if (++mon_bits % 8 == 0) mon_q.push_back(mon_mosi);
  end
  always @(posedge clk) if (rst_n) begin
    if (cs_n && sclk) sclk_bad++;
    if (sel) n_sel++;
    if (rx_valid) slave_q.push_back(s_rx);
  end
  logic sclk_d = 0, mosi_d = 0;
  always @(posedge clk) begin
    if (sclk && sclk_d && mosi != mosi_d) mosi_bad++;
    sclk_d <= sclk;
    mosi_d <= mosi;
  end

  initial begin
    int n_tr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int t = 0; t < 60; t++) begin
      int len;
      logic [7:0] sent [$];
      logic [7:0] prev;
      len = $urandom_range(1, 6);
      prev = 8'h5A;
      sent.delete();
      for (int k = 0; k < len; k++) begin
        int t0, exp_t;
        @(negedge clk);
        tx_byte = 8'($urandom);
        last = (k == len - 1);
        start = 1;
        sent.push_back(tx_byte);
        @(negedge clk); start = 0;
        t0 = 1;
        while (!done) begin @(negedge clk); t0++; end
        check(rx_byte == prev, $sformatf("master read %h expected %h", rx_byte, prev));
        // 16 divider periods per byte, one more of select set-up before the first
        // byte, two more (hold and gap) after the last
        exp_t = 16 * CLK_DIV + (k == 0 ? CLK_DIV : 0) + (last ? 2 * CLK_DIV : 0);
        check(t0 >= exp_t && t0 <= exp_t + 2, $sformatf("byte %0d took %0d cycles, expected %0d", k, t0, exp_t));
        check(!cs_n || last, "select held within a transaction");
        prev = tx_byte + 8'd1;
      end
      while (busy) @(negedge clk);
      check(cs_n, "select released after the last byte");
      n_tr++;
      check(mon_q == sent, "bus monitor saw the sent bytes");
      check(slave_q == sent, "slave received the sent bytes");
      mon_q.delete(); slave_q.delete();
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    check(n_sel == n_tr, $sformatf("sel pulses %0d for %0d transactions", n_sel, n_tr));
    check(sclk_bad == 0, "SCLK low while deselected");
    check(mosi_bad == 0, "MOSI steady while SCLK high");
    finish();
  end
endmodule
