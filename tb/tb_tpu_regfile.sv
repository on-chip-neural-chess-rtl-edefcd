// tpu_regfile: writes to all three groups, register 0 stays zero, the move-count port
// wins over a same-cycle general write, the decode field writes land in 20..31, and
// the parallel weight/bias views show the groups.
module tb_tpu_regfile;
  localparam int WATCHDOG = 10000;
  `include "tb_common.svh"
  logic rst_n = 1;
  initial #1 rst_n = 0;  // an asynchronous reset needs an edge after time 0
  logic [4:0] ra1 = 0, ra2 = 0;
  logic [31:0] rd1, rd2;
  logic we = 0, mtn_we = 0, lnum_we = 0, linfo_we = 0;
  logic [1:0] wgroup = 0;
  logic [5:0] waddr = 0;
  logic [31:0] wdata = 0, mtn = 0;
  logic [31:0] lnum [3], linfo [9], cfg [12], w_all [64], b_all [64];
  logic [31:0] m0 [64], m1 [64], m2 [64];
  tpu_regfile dut (.*);
  initial begin
    foreach (lnum[i]) lnum[i] = 0;
    foreach (linfo[i]) linfo[i] = 0;
    foreach (m0[i]) begin m0[i] = 0; m1[i] = 0; m2[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we = 1; wgroup = 2'(i % 3); waddr = 6'($urandom); wdata = $urandom;
      @(posedge clk); #1;
      if (wgroup == 0 && waddr != 0) m0[waddr] = wdata;
      if (wgroup == 1) m1[waddr] = wdata;
      if (wgroup == 2) m2[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); ra2 = 5'(31 - i); #1;
      check(rd1 == m0[i] && rd2 == m0[31 - i], $sformatf("read r%0d", i));
    end
    for (int i = 0; i < 64; i++) check(w_all[i] == m1[i] && b_all[i] == m2[i], $sformatf("group 1/2 entry %0d", i));
    // move count beats a general write to register 1
    @(negedge clk); we = 1; wgroup = 0; waddr = 1; wdata = 32'h55; mtn_we = 1; mtn = 32'd7;
    @(negedge clk); we = 0; mtn_we = 0; ra1 = 1; #1;
    check(rd1 == 7, "move count write priority");
    // decode field writes
    foreach (lnum[i]) lnum[i] = 32'(100 + i);
    foreach (linfo[i]) linfo[i] = 32'(200 + i);
    lnum_we = 1; linfo_we = 1;
    @(negedge clk); lnum_we = 0; linfo_we = 0;
    for (int i = 0; i < 12; i++) check(cfg[i] == (i < 3 ? 100 + i : 197 + i), $sformatf("cfg %0d", i));
    ra1 = 22; ra2 = 31; #1;
    check(rd1 == 102 && rd2 == 208, "decoded fields readable");
    finish();
  end
endmodule
