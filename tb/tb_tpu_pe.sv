// tpu_pe: registered pass-through of the activation and multiply-accumulate of the
// partial sum with the stored weight, over random operands.
module tb_tpu_pe;
  localparam int WATCHDOG = 10000;
  `include "tb_common.svh"
  logic rst_n = 1, w_load = 0;
  initial #1 rst_n = 0;  // an asynchronous reset needs an edge after time 0
  logic signed [7:0]  w_in = 0;
  logic signed [15:0] a_in = 0, a_out;
  logic signed [31:0] p_in = 0, p_out;
  tpu_pe dut (.*);
  initial begin
    int w;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      if (i % 10 == 0) begin w = $signed(8'($urandom)); w_in = 8'(w); w_load = 1; @(negedge clk); w_load = 0; end
      a_in = 16'($urandom); p_in = 32'($urandom) >>> 4;
      @(posedge clk); #1;
      check(a_out == a_in, "activation passes right");
      check(p_out == p_in + 32'(int'(a_in) * w), $sformatf("psum %0d, expected %0d", p_out, p_in + int'(a_in) * w));
    end
    finish();
  end
endmodule
