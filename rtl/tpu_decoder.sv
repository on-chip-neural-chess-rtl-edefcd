// Instruction decoder of the tiny TPU (combinational).
//
// Fields: instr[31:29] alu/branch funct, [28] src2_sel (immediate operand),
// [27] wrd_sel (write back memory data), [26] pc_sel (branch), [25] jump_sel,
// [24:23] rd_group, [22:18] src1, [17:13] src2, [17:6] immediate/offset (sign
// extended), [11:0] branch/jump label, [5:0] rd. instr[31:23] all ones marks a special
// instruction whose code is instr[3:0]; set_ifmap_o takes its destination register
// from instr[9:4]; its select bits are not used as branch or jump. reg_we is set for arithmetic and load instructions.
// The field layout follows the instruction encoding; the special-instruction operand
// fields are this design's choice.
module tpu_decoder
  import onechan_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       c
);

  always_comb begin
    c.funct    = instr[31:29];
    c.src2_sel = instr[28];
    c.wrd_sel  = instr[27];
    c.special  = (instr[31:23] == 9'h1FF);
    c.pc_sel   = instr[26] && !c.special;
    c.jump_sel = instr[25] && !c.special;
    c.rd_group = instr[24:23];
    c.rs1      = instr[22:18];
    c.rs2      = instr[17:13];
    c.rd       = instr[5:0];
    c.imm      = {{20{instr[17]}}, instr[17:6]};
    c.label    = instr[11:0];
    c.sp_code  = special_e'(instr[3:0]);
    c.sp_rd    = instr[9:4];
    c.reg_we   = !c.special && !c.pc_sel && !c.jump_sel;
  end

endmodule
