// ROWS x COLS weight-stationary systolic array.
//
// PE(k,n) holds weight w[k][n]. Skewed activations enter row k from the left and move
// right; partial sums start at zero on the top row and move down. All ROWS*COLS
// weights are loaded in parallel with one w_load pulse. For an input vector whose
// element k enters row k at cycle t+k (see tpu_systolic_feeder), column n delivers
// sum_k a[k]*w[k][n] on col_out[n] at cycle t+ROWS+n: the outputs of one vector come
// out skewed by one cycle per column. The array follows the description; its size is
// the 8x8 of the 64-register weight group.
module tpu_systolic_array #(
  parameter int ROWS  = 8,
  parameter int COLS  = 8,
  parameter int ACT_W = 16,
  parameter int WGT_W = 8,
  parameter int ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    w_load,
  input  logic signed [WGT_W-1:0] w_in   [ROWS][COLS],
  input  logic signed [ACT_W-1:0] a_in   [ROWS],
  output logic signed [ACC_W-1:0] col_out[COLS]
);

  logic signed [ACT_W-1:0] a_h [ROWS][COLS+1];
  logic signed [ACC_W-1:0] p_v [ROWS+1][COLS];

  for (genvar k = 0; k < ROWS; k++) begin : g_left
    assign a_h[k][0] = a_in[k];
  end
  for (genvar n = 0; n < COLS; n++) begin : g_top
    assign p_v[0][n]    = '0;
    assign col_out[n]   = p_v[ROWS][n];
  end

  for (genvar k = 0; k < ROWS; k++) begin : g_row
    for (genvar n = 0; n < COLS; n++) begin : g_col
      tpu_pe #(.ACT_W(ACT_W), .WGT_W(WGT_W), .ACC_W(ACC_W)) u_pe (
        .clk   (clk),
        .rst_n (rst_n),
        .w_load(w_load),
        .w_in  (w_in[k][n]),
        .a_in  (a_h[k][n]),
        .p_in  (p_v[k][n]),
        .a_out (a_h[k][n+1]),
        .p_out (p_v[k+1][n])
      );
    end
  end

endmodule
