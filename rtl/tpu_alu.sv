// ALU and branch comparator of the tiny TPU (combinational).
//
// funct (instr[31:29]) selects the arithmetic operation: ADD, MUL (low 32 bits),
// SHL, SHR_A (arithmetic), AND, XOR, OR; 3'b111 gives zero. The same field selects the
// branch condition on a and b, signed: EQ, NE, GE, LE, GT, LT, and NEG (a < 0).
// The operation list and their codes follow the instruction set; shift amounts
// using b[4:0] and the meaning of NEG are this design's choices.
module tpu_alu
  import onechan_pkg::*;
(
  input  logic [2:0]  funct,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output logic        taken
);

  always_comb begin
    unique case (alu_funct_e'(funct))
      F_ADD:   y = a + b;
      F_MUL:   y = a * b;
      F_SHL:   y = a << b[4:0];
      F_SHRA:  y = 32'($signed(a) >>> b[4:0]);
      F_AND:   y = a & b;
      F_XOR:   y = a ^ b;
      F_OR:    y = a | b;
      default: y = '0;
    endcase
    unique case (br_funct_e'(funct))
      B_EQ:    taken = (a == b);
      B_NE:    taken = (a != b);
      B_GE:    taken = ($signed(a) >= $signed(b));
      B_LE:    taken = ($signed(a) <= $signed(b));
      B_GT:    taken = ($signed(a) >  $signed(b));
      B_LT:    taken = ($signed(a) <  $signed(b));
      B_NEG:   taken = a[31];
      default: taken = 1'b0;
    endcase
  end

endmodule
