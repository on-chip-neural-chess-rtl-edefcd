// tpu_instr_rom: load random words at random addresses and read them back.
module tb_tpu_instr_rom;
  localparam int WATCHDOG = 10000;
  `include "tb_common.svh"
  logic [11:0] raddr = 0, waddr = 0;
  logic [31:0] rdata, wdata = 0;
  logic we = 0;
  logic [31:0] m [int];
  tpu_instr_rom dut (.*);
  initial begin
    for (int i = 0; i < 500; i++) begin
      @(negedge clk); we = 1; waddr = 12'($urandom); wdata = $urandom; m[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    foreach (m[a]) begin raddr = 12'(a); #1; check(rdata == m[a], $sformatf("addr %0d", a)); end
    finish();
  end
endmodule
