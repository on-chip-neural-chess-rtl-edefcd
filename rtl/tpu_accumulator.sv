// Accumulator after the systolic array: turns the skewed column outputs into layer
// outputs, adds the bias, applies the optional leaky ReLU and saturates.
//
// Matrix multiplication: column n's output is delayed by COLS-1-n cycles so that the
// COLS results of one input vector appear together on mm_out, COLS-1 cycles after
// column 0 delivered it.
// Convolution: the column outputs of the same cycle are added (conv_out, no delay).
// With the kernel stored horizontally flipped, this sum is one output pixel of the
// row being computed (see tpu_layer_engine).
// Leaky ReLU: negative values are divided by 2**LEAKY_SHIFT (arithmetic shift).
// Results saturate to ACT_W bits. Bias and relu inputs are applied combinationally
// to whatever sits at the outputs in the same cycle.
// Summing the columns for convolution and the flipped kernel follow the description;
// the leaky slope, saturation and widths are this design's choices.
module tpu_accumulator #(
  parameter int COLS        = 8,
  parameter int ACT_W       = 16,
  parameter int ACC_W       = 32,
  parameter int LEAKY_SHIFT = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ACC_W-1:0] col_in   [COLS],
  input  logic signed [ACT_W-1:0] bias_vec [COLS],
  input  logic signed [ACT_W-1:0] bias_conv,
  input  logic                    relu,
  output logic signed [ACT_W-1:0] mm_out   [COLS],
  output logic signed [ACT_W-1:0] conv_out
);

  // dly[n][j]: column n delayed by j+1 cycles
  logic signed [ACC_W-1:0] dly [COLS][COLS];
  logic signed [ACC_W-1:0] aligned [COLS];
  logic signed [ACC_W-1:0] csum;

  function automatic logic signed [ACT_W-1:0] finish(logic signed [ACC_W-1:0] x,
                                                      logic signed [ACT_W-1:0] b, logic r);
    logic signed [ACC_W-1:0] y;
    y = x + ACC_W'(b);
    if (r && y < 0) y = y >>> LEAKY_SHIFT;
    if (y > ACC_W'((2 ** (ACT_W - 1)) - 1)) return ACT_W'((2 ** (ACT_W - 1)) - 1);
    if (y < -ACC_W'(2 ** (ACT_W - 1)))      return ACT_W'(-(2 ** (ACT_W - 1)));
    return ACT_W'(y);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < COLS; n++)
        for (int j = 0; j < COLS; j++) dly[n][j] <= '0;
    end else begin
      for (int n = 0; n < COLS; n++) begin
        dly[n][0] <= col_in[n];
        for (int j = 1; j < COLS; j++) dly[n][j] <= dly[n][j-1];
      end
    end
  end

  always_comb begin
    csum = '0;
    for (int n = 0; n < COLS; n++) begin
      aligned[n] = (n == COLS - 1) ? col_in[n] : dly[n][COLS-2-n];
      mm_out[n]  = finish(aligned[n], bias_vec[n], relu);
      csum       = csum + col_in[n];
    end
    conv_out = finish(csum, bias_conv, relu);
  end

endmodule
