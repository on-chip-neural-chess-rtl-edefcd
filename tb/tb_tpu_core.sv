// tpu_core with the register file and memories and a stand-in layer engine that
// finishes after ENG_LAT cycles: arithmetic, immediates, loads into all three groups,
// taken and untaken branches, a counted loop, decode_layer(_info), a stalled special
// instruction, set_ifmap_o write-back and send_optimal_move with saturation.
module tb_tpu_core;
  import onechan_pkg::*;
  localparam int WATCHDOG = 10000;
  localparam int ENG_LAT  = 6;
  `include "tb_common.svh"
  logic rst_n = 1;
  initial #1 rst_n = 0;  // an asynchronous reset needs an edge after time 0
  logic [11:0] pc, mem_addr;
  logic [31:0] instr, rd1, rd2, rf_data, mem_data;
  logic [4:0]  ra1, ra2;
  logic rf_we, lnum_we, linfo_we, eng_start, res_valid;
  logic eng_done = 0;
  logic [1:0] rf_group;
  logic [5:0] rf_addr;
  logic [31:0] lnum [3], linfo [9], cfg [12], w_all [64], b_all [64];
  special_e eng_code;
  logic [31:0] eng_opnd, eng_res = 0;
  logic [7:0] res_value, res_index;
  logic pwe = 0, mwe = 0;
  logic [11:0] pa = 0, ma = 0;
  logic [31:0] pd = 0, md = 0;
  int n_start = 0, stall_cycles = 0, n_res = 0;
  logic [7:0] got_value, got_index;

  tpu_core dut (.*);
  tpu_regfile u_rf (.clk, .rst_n, .ra1, .ra2, .rd1, .rd2, .we(rf_we), .wgroup(rf_group),
    .waddr(rf_addr), .wdata(rf_data), .mtn_we(1'b0), .mtn(32'd0), .lnum_we, .lnum,
    .linfo_we, .linfo, .cfg, .w_all, .b_all);
  tpu_instr_rom u_rom (.clk, .raddr(pc), .rdata(instr), .we(pwe), .waddr(pa), .wdata(pd));
  tpu_main_mem u_mem (.clk, .raddr_a(mem_addr), .rdata_a(mem_data), .raddr_b(12'd0),
    .rdata_b(), .we(mwe), .waddr(ma), .wdata(md));

  // stand-in engine
  always @(posedge clk) if (rst_n) begin
    eng_done <= 0;
    if (eng_start) begin
      n_start++;
      fork begin
        repeat (ENG_LAT - 1) @(posedge clk);
        eng_res  <= 32'd1000 + eng_opnd;
        eng_done <= 1;
      end join_none
    end
    if (pc == 12'd20) stall_cycles++;
    if (res_valid) begin n_res++; got_value = res_value; got_index = res_index; end
  end

  logic [31:0] prog [$];
  initial begin
    prog = '{
      i_itype(F_ADD, 0, 12'd100, 2),            // 0  r2 = 100
      i_itype(F_ADD, 0, 12'hFF9, 3),            // 1  r3 = -7
      i_rtype(F_ADD, 2, 3, 4),                  // 2  r4 = 93
      i_rtype(F_MUL, 2, 3, 5),                  // 3  r5 = -700
      i_itype(F_SHL, 2, 12'd3, 6),              // 4  r6 = 800
      i_itype(F_SHRA, 3, 12'd1, 7),             // 5  r7 = -4
      i_rtype(F_AND, 2, 3, 8),                  // 6  r8 = 100 & -7
      i_itype(F_XOR, 2, 12'h0F0, 9),            // 7  r9 = 100 ^ 0xF0
      i_rtype(F_OR, 2, 3, 10),                  // 8  r10 = 100 | -7
      i_load(2'd0, 2, 12'd5, 11),               // 9  r11 = mem[105]
      i_load(2'd1, 0, 12'h100, 4),              // 10 g1[4] = mem[0x100]
      i_load(2'd2, 0, 12'h200, 5),              // 11 g2[5] = mem[0x200]
      i_special(S_DECODE_LAYER, 11, 0, 0),      // 12
      i_itype(F_ADD, 0, 12'd5, 13),             // 13 r13 = 5
      i_itype(F_ADD, 12, 12'd1, 12),            // 14 r12++
      i_branch(B_LT, 12, 13, 12'd14),           // 15 loop while r12 < 5
      i_branch(B_NEG, 3, 0, 12'd18),            // 16 taken
      i_itype(F_ADD, 0, 12'd1, 14),             // 17 skipped
      i_branch(B_EQ, 2, 3, 12'd30),             // 18 not taken
      i_itype(F_ADD, 0, 12'd2, 15),             // 19 r15 = 2
      i_special(S_LOAD_WEIGHT, 2, 0, 0),        // 20 stalls ENG_LAT cycles
      i_special(S_SET_IFMAP_O, 3, 0, 16),       // 21 r16 = 1000 + r3
      i_special(S_DECODE_LAYER_INFO, 11, 0, 0), // 22
      i_special(S_SEND_OPT_MOVE, 5, 4, 0),      // 23 value sat(-700) = -128, index 93
      i_jump(12'd24)};                          // 24 halt
    foreach (prog[i]) begin @(negedge clk); pwe = 1; pa = 12'(i); pd = prog[i]; end
    @(negedge clk); pwe = 0;
    @(negedge clk); mwe = 1; ma = 105; md = onechan_tb_pkg::layer_rec(6, 3, 8'h13, 2, 1, 8'h0F, 1, 0, 1);
    @(negedge clk); ma = 12'h100; md = 32'hABCD;
    @(negedge clk); ma = 12'h200; md = 32'h1234;
    @(negedge clk); mwe = 0;
    rst_n = 1;
    wait (pc == 12'd24);
    repeat (3) @(posedge clk);
    check(u_rf.g0[2] == 100 && u_rf.g0[3] == -7, "ADDI");
    check(u_rf.g0[4] == 93, "ADD");
    check(u_rf.g0[5] == -700, "MUL");
    check(u_rf.g0[6] == 800, "SHLI");
    check(u_rf.g0[7] == -4, "SHRA_I");
    check(u_rf.g0[8] == (100 & -7) && u_rf.g0[9] == (100 ^ 32'hF0) && u_rf.g0[10] == (100 | -7), "logic ops");
    check(u_rf.g0[11] == u_mem.mem[105], "LW_0");
    check(u_rf.g1[4] == 32'hABCD && u_rf.g2[5] == 32'h1234, "LW_weight / LW_bias");
    check(u_rf.g0[20] == 32'(u_mem.mem[105][31:28]) && u_rf.g0[21] == 32'(u_mem.mem[105][27:24])
          && u_rf.g0[22] == 32'(u_mem.mem[105][23:20]), "decode_layer");
    check(u_rf.g0[12] == 5, "counted loop");
    check(u_rf.g0[14] == 0 && u_rf.g0[15] == 2, "branch taken / not taken");
    check(u_rf.g0[16] == 1000 - 7, "set_ifmap_o write-back");
    check(n_start == 2, $sformatf("engine starts %0d", n_start));
    check(stall_cycles == ENG_LAT + 1, $sformatf("stall cycles %0d", stall_cycles));
    check(n_res == 1 && got_value == 8'h80 && got_index == 8'd93, "send_optimal_move");
    // the same word read as a layer record: wh 6, ww 3, wa 0x13, bh 2, bw 1, ba 0x0F, relu 1, conv 0, flatten 1
    check(u_rf.g0[23] == 6 && u_rf.g0[24] == 3 && u_rf.g0[25] == 8'h13, "decode_layer_info weights");
    check(u_rf.g0[26] == 2 && u_rf.g0[27] == 1 && u_rf.g0[28] == 8'h0F, "decode_layer_info biases");
    check(u_rf.g0[29] == 1 && u_rf.g0[30] == 0 && u_rf.g0[31] == 1, "decode_layer_info flags");
    finish();
  end
endmodule
