// Systolic data generator: turns one input vector per cycle into skewed systolic data.
// Element k of the vector leaves k cycles after it entered (element 0 without delay),
// so row k of the array sees it exactly when the partial sum of the same vector
// arrives from the row above. The skewing follows the description's dataflow; the
// shift-register form is this design's choice.
module tpu_systolic_feeder #(
  parameter int ROWS  = 8,
  parameter int ACT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ACT_W-1:0] vec_in  [ROWS],
  output logic signed [ACT_W-1:0] vec_out [ROWS]
);

  // dly[k][j]: element k delayed by j+1 cycles
  logic signed [ACT_W-1:0] dly [ROWS][ROWS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < ROWS; k++)
        for (int j = 0; j < ROWS; j++) dly[k][j] <= '0;
    end else begin
      for (int k = 0; k < ROWS; k++) begin
        dly[k][0] <= vec_in[k];
        for (int j = 1; j < ROWS; j++) dly[k][j] <= dly[k][j-1];
      end
    end
  end

  always_comb begin
    for (int k = 0; k < ROWS; k++) vec_out[k] = (k == 0) ? vec_in[0] : dly[k][k-1];
  end

endmodule
