// tpu_systolic_feeder: element k of a vector appears k cycles later.
module tb_tpu_systolic_feeder;
  localparam int WATCHDOG = 10000;
  `include "tb_common.svh"
  logic rst_n = 1;
  initial #1 rst_n = 0;  // an asynchronous reset needs an edge after time 0
  logic signed [15:0] vec_in [8], vec_out [8];
  logic signed [15:0] hist [$][8];
  tpu_systolic_feeder dut (.*);
  initial begin
    foreach (vec_in[k]) vec_in[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      foreach (vec_in[k]) vec_in[k] = 16'($urandom);
      hist.push_front(vec_in);
      #1;
      for (int k = 0; k < 8; k++)
        if (hist.size() > k) check(vec_out[k] == hist[k][k], $sformatf("row %0d delay", k));
    end
    finish();
  end
endmodule
