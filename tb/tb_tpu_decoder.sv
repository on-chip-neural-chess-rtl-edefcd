// tpu_decoder: fields and selects of instructions of every class, with the bit
// patterns of the instruction-set table written out by hand.
module tb_tpu_decoder;
  import onechan_pkg::*;
  localparam int WATCHDOG = 1000;
  `include "tb_common.svh"
  logic [31:0] instr;
  ctrl_t c;
  tpu_decoder dut (.*);
  initial begin
    // ADD r9 = r3 + r4
    instr = 32'b000_000000_00011_00100_0000000_001001; #1;
    check(c.funct == 0 && !c.src2_sel && !c.wrd_sel && !c.pc_sel && !c.jump_sel && c.rd_group == 0, "ADD selects");
    check(c.rs1 == 3 && c.rs2 == 4 && c.rd == 9 && c.reg_we && !c.special, "ADD fields");
    // SHRA_I r2 = r5 >>> -3
    instr = 32'b011_100000_00101_111111111101_000010; #1;
    check(c.funct == 3 && c.src2_sel && c.imm == -32'sd3 && c.rd == 2 && c.reg_we, "SHRA_I");
    // LT r6, r22 -> 9
    instr = 32'b101_001000_00110_10110_0_000000001001; #1;
    check(c.pc_sel && !c.jump_sel && !c.reg_we && c.label == 9 && c.rs1 == 6 && c.rs2 == 22, "LT");
    // JUMP 0x123
    instr = {9'b111000111, 11'd0, 12'h123}; #1;
    check(c.jump_sel && !c.reg_we && c.label == 12'h123 && !c.special, "JUMP");
    // LW_weight r7 <- mem[r1 + 5] into group 1
    instr = 32'b000_110001_00001_000000000101_000111; #1;
    check(c.src2_sel && c.wrd_sel && c.rd_group == 1 && c.imm == 5 && c.rd == 7 && c.reg_we, "LW_weight");
    // LW_bias
    instr = 32'b000_110010_00001_000000000101_000111; #1;
    check(c.rd_group == 2 && c.reg_we, "LW_bias");
    // special codes 0..9
    for (int k = 0; k < 10; k++) begin
      instr = {9'h1FF, 5'd7, 5'd8, 3'd0, 6'd33, 4'(k)}; #1;
      check(c.special && int'(c.sp_code) == k && !c.reg_we && !c.pc_sel && !c.jump_sel, $sformatf("special %0d", k));
      check(c.rs1 == 7 && c.rs2 == 8 && c.sp_rd == 33, "special operands");
    end
    // builders of the package agree with the hand-written patterns
    check(i_rtype(F_ADD, 5'd3, 5'd4, 6'd9) == 32'b000_000000_00011_00100_0000000_001001, "i_rtype");
    check(i_load(2'd1, 5'd1, 12'd5, 6'd7) == 32'b000_110001_00001_000000000101_000111, "i_load");
    finish();
  end
endmodule
