// tpu_accumulator: de-skewing of matrix-multiply columns (column n delayed by 7-n),
// same-cycle column sum for convolution, bias, leaky ReLU and saturation.
module tb_tpu_accumulator;
  localparam int WATCHDOG = 10000;
  `include "tb_common.svh"
  logic rst_n = 1, relu = 0;
  initial #1 rst_n = 0;  // an asynchronous reset needs an edge after time 0
  logic signed [31:0] col_in [8];
  logic signed [15:0] bias_vec [8], bias_conv, mm_out [8], conv_out;
  int hist [$][8];
  tpu_accumulator dut (.*);

  function automatic int fin(int x, int b, bit r);
    int y = x + b;
    if (r && y < 0) y = y >>> 3;
    return y > 32767 ? 32767 : (y < -32768 ? -32768 : y);
  endfunction

  initial begin
    int row [8];
    foreach (col_in[n]) col_in[n] = 0;
    foreach (bias_vec[n]) bias_vec[n] = 0;
    bias_conv = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      @(negedge clk);
      relu = t[1];
      foreach (col_in[n]) begin
        row[n] = (t % 7 == 0) ? $signed(32'($urandom)) >>> 8 : $signed(20'($urandom));
        col_in[n] = row[n];
      end
      hist.push_front(row);
      foreach (bias_vec[n]) bias_vec[n] = 16'($urandom);
      bias_conv = 16'($urandom);
      #1;
      begin
        automatic int s = 0;
        foreach (row[n]) s += row[n];
        check(conv_out == 16'(fin(s, bias_conv, relu)), $sformatf("conv sum t=%0d", t));
      end
      for (int n = 0; n < 8; n++)
        if (hist.size() > 7 - n)
          check(mm_out[n] == 16'(fin(hist[7-n][n], bias_vec[n], relu)),
                $sformatf("mm col %0d t=%0d: %0d", n, t, mm_out[n]));
    end
    finish();
  end
endmodule
