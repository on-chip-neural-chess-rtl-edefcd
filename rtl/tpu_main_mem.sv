// Main memory of the tiny TPU: 2**AW 32-bit words, the same depth as the instruction
// memory. Layer records live at 0x000-0x0FF, weights at 0x100-0x1FF and biases at
// 0x200-0x2FF, one value per word. Two combinational read ports (processor loads and
// the weight/bias loader) and one synchronous write port for loading the contents.
// Depth and memory map follow the description; the ports are this design's choice.
module tpu_main_mem #(
  parameter int AW = 12
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr_a,
  output logic [31:0]   rdata_a,
  input  logic [AW-1:0] raddr_b,
  output logic [31:0]   rdata_b,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata
);

  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;
  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];

endmodule
