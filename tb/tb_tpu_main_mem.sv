// tpu_main_mem: load random words and read them back on both read ports.
module tb_tpu_main_mem;
  localparam int WATCHDOG = 10000;
  `include "tb_common.svh"
  logic [11:0] raddr_a = 0, raddr_b = 0, waddr = 0;
  logic [31:0] rdata_a, rdata_b, wdata = 0;
  logic we = 0;
  logic [31:0] m [int];
  int keys [$];
  tpu_main_mem dut (.*);
  initial begin
    for (int i = 0; i < 500; i++) begin
      @(negedge clk); we = 1; waddr = 12'($urandom); wdata = $urandom; m[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    foreach (m[a]) keys.push_back(a);
    foreach (keys[i]) begin
      raddr_a = 12'(keys[i]); raddr_b = 12'(keys[keys.size() - 1 - i]); #1;
      check(rdata_a == m[keys[i]] && rdata_b == m[keys[keys.size() - 1 - i]], "read ports");
    end
    finish();
  end
endmodule
