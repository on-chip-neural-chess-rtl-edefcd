// Instruction memory of the tiny TPU: 2**AW words of 32 bits, AW = 12.
// Combinational read (the core is single-cycle); a synchronous write port loads the
// program, which is generated off-chip. The 12-bit address follows the description;
// the load port is this design's choice.
module tpu_instr_rom #(
  parameter int AW = 12
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata
);

  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;
  assign rdata = mem[raddr];

endmodule
