// Weight-stationary processing element of the systolic array.
//
// The PE keeps one weight. Every cycle it passes its activation input one PE to the
// right (a_out) and passes down the partial sum from the PE above plus activation
// times weight (p_out). Both outputs are registered, so data moves one PE per cycle.
// w_load replaces the weight. The weight-stationary scheme follows the description;
// the widths are this design's choices.
module tpu_pe #(
  parameter int ACT_W = 16,
  parameter int WGT_W = 8,
  parameter int ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    w_load,
  input  logic signed [WGT_W-1:0] w_in,
  input  logic signed [ACT_W-1:0] a_in,
  input  logic signed [ACC_W-1:0] p_in,
  output logic signed [ACT_W-1:0] a_out,
  output logic signed [ACC_W-1:0] p_out
);

  logic signed [WGT_W-1:0] w_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_q   <= '0;
      a_out <= '0;
      p_out <= '0;
    end else begin
      if (w_load) w_q <= w_in;
      a_out <= a_in;
      p_out <= p_in + ACC_W'(a_in * w_q);
    end
  end

endmodule
