// tpu_systolic_array: random weights and input vectors fed with the diagonal skew;
// column n must deliver the dot product of vector i with weight column n at cycle
// i + ROWS + n.
module tb_tpu_systolic_array;
  localparam int WATCHDOG = 10000;
  `include "tb_common.svh"
  logic rst_n = 1, w_load = 0;
  initial #1 rst_n = 0;  // an asynchronous reset needs an edge after time 0
  logic signed [7:0]  w_in [8][8];
  logic signed [15:0] a_in [8];
  logic signed [31:0] col_out [8];
  int vecs [20][8];
  tpu_systolic_array dut (.*);
  initial begin
    foreach (a_in[k]) a_in[k] = 0;
    foreach (w_in[k, n]) w_in[k][n] = 8'($urandom);
    foreach (vecs[i, k]) vecs[i][k] = $signed(12'($urandom));
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); w_load = 1; @(negedge clk); w_load = 0;
    for (int t = 0; t < 40; t++) begin
      // input side: row k gets element k of vector t-k
      foreach (a_in[k]) a_in[k] = (t - k >= 0 && t - k < 20) ? 16'(vecs[t-k][k]) : 16'd0;
      #1;
      // output side: column n shows vector t-8-n
      for (int n = 0; n < 8; n++) begin
        automatic int i = t - 8 - n;
        if (i >= 0 && i < 20) begin
          automatic int e = 0;
          for (int k = 0; k < 8; k++) e += vecs[i][k] * w_in[k][n];
          check(col_out[n] == e, $sformatf("t=%0d col %0d: %0d expected %0d", t, n, col_out[n], e));
        end
      end
      @(negedge clk);
    end
    finish();
  end
endmodule
