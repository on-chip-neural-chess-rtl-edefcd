// Register file of the tiny TPU: three groups of 64 32-bit registers.
//
// Group 0 holds the move count and the network description (input height and width,
// layer count, kernel shapes, base addresses, operation, relu and flatten flags);
// register 0 reads as zero and register 1 is the move count. Groups 1 and 2 hold the
// weights and biases of the current layer and are visible all at once (w_all, b_all)
// so the whole 8x8 weight matrix reaches the systolic array in parallel.
// Ports: two combinational reads of group 0 registers 0..31; one synchronous write
// (group, address, data); a move-count write from the packet receiver that wins over
// the general write; field writes of registers 20..22 (layer count record) and
// 23..31 (layer record) used by the decode instructions. cfg shows registers 20..31.
// Three groups of 64 and their contents follow the description; the exact register
// numbers are this design's choice (see onechan_pkg).
module tpu_regfile
  import onechan_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  output logic [31:0] rd1,
  output logic [31:0] rd2,
  input  logic        we,
  input  logic [1:0]  wgroup,
  input  logic [5:0]  waddr,
  input  logic [31:0] wdata,
  input  logic        mtn_we,
  input  logic [31:0] mtn,
  input  logic        lnum_we,
  input  logic [31:0] lnum   [3],   // registers 20..22
  input  logic        linfo_we,
  input  logic [31:0] linfo  [9],   // registers 23..31
  output logic [31:0] cfg    [12],  // registers 20..31
  output logic [31:0] w_all  [64],
  output logic [31:0] b_all  [64]
);

  logic [31:0] g0 [64];
  logic [31:0] g1 [64];
  logic [31:0] g2 [64];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 64; i++) begin
        g0[i] <= '0; g1[i] <= '0; g2[i] <= '0;
      end
    end else begin
      if (we) begin
        case (wgroup)
          2'd0:    if (waddr != 0) g0[waddr] <= wdata;
          2'd1:    g1[waddr] <= wdata;
          2'd2:    g2[waddr] <= wdata;
          default: ;
        endcase
      end
      if (lnum_we)  for (int i = 0; i < 3; i++) g0[R_IN_H + i] <= lnum[i];
      if (linfo_we) for (int i = 0; i < 9; i++) g0[R_W_H + i]  <= linfo[i];
      if (mtn_we) g0[R_MOVE_NUM] <= mtn;
    end
  end

  assign rd1 = (ra1 == 0) ? '0 : g0[{1'b0, ra1}];
  assign rd2 = (ra2 == 0) ? '0 : g0[{1'b0, ra2}];
  always_comb for (int i = 0; i < 12; i++) cfg[i] = g0[R_IN_H + i];
  assign w_all = g1;
  assign b_all = g2;

endmodule
