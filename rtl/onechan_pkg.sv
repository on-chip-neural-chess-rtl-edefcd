// Shared types and constants of the two-FPGA chess analyzer.
//
// Board: 64 squares, index = row*8 + col, row 0 is white's back rank. Each square holds
// one byte: a one-hot piece type in bits [5:0] and the colour in bit 6 (1 = black);
// 8'h00 is an empty square. The exact bit assignment is this design's choice: the
// description only says the byte is a one-hot code of piece and colour.
//
// SPI packet (traversal FPGA -> TPU FPGA), this design's framing:
//   PKT_SYNC, side, count, 64 grid bytes, count x {from, to}, checksum (XOR of all
//   bytes after PKT_SYNC).
// Result read: RD_CMD, then three dummy bytes; the TPU answers {status, value, index}
// in bytes 1..3.
package onechan_pkg;

  typedef logic [7:0] piece_t;
  typedef logic [5:0] sq_t;

  typedef struct packed {
    sq_t from;
    sq_t to;
  } move_t;

  localparam int P_PAWN   = 0;
  localparam int P_KNIGHT = 1;
  localparam int P_BISHOP = 2;
  localparam int P_ROOK   = 3;
  localparam int P_QUEEN  = 4;
  localparam int P_KING   = 5;
  localparam int P_BLACK  = 6;

  localparam piece_t EMPTY = 8'h00;
  localparam piece_t WP = 8'h01, WN = 8'h02, WB = 8'h04, WR = 8'h08, WQ = 8'h10, WK = 8'h20;
  localparam piece_t BP = 8'h41, BN = 8'h42, BB = 8'h44, BR = 8'h48, BQ = 8'h50, BK = 8'h60;

  localparam logic [7:0] PKT_SYNC = 8'hA5;
  localparam logic [7:0] RD_CMD   = 8'h3C;

  // Negamax value of a position with no moves (and the initial "best" of a node).
  localparam int NEG_INF = -1000;

  // Material value of a piece type, used to build the TPU's input feature map.
  function automatic int piece_value(piece_t p);
    if (p[P_PAWN])   return 1;
    if (p[P_KNIGHT]) return 3;
    if (p[P_BISHOP]) return 3;
    if (p[P_ROOK])   return 5;
    if (p[P_QUEEN])  return 9;
    if (p[P_KING])   return 50;
    return 0;
  endfunction

  // ---------------- Tiny TPU instruction set ----------------
  // instr[31:29] funct, [28] src2_sel, [27] wrd_sel, [26] pc_sel, [25] jump_sel,
  // [24:23] rd_group, [22:18] src1, [17:13] src2, [17:6] imm/offset, [11:0] label,
  // [5:0] rd, [3:0] special code.
  typedef enum logic [2:0] {
    F_ADD = 3'd0, F_MUL = 3'd1, F_SHL = 3'd2, F_SHRA = 3'd3,
    F_AND = 3'd4, F_XOR = 3'd5, F_OR  = 3'd6, F_NONE = 3'd7
  } alu_funct_e;

  typedef enum logic [2:0] {
    B_EQ = 3'd0, B_NE = 3'd1, B_GE = 3'd2, B_LE = 3'd3,
    B_GT = 3'd4, B_LT = 3'd5, B_NEG = 3'd6, B_NONE = 3'd7
  } br_funct_e;

  typedef enum logic [3:0] {
    S_DECODE_LAYER      = 4'd0,
    S_COMPUTE_GRID      = 4'd1,
    S_DECODE_LAYER_INFO = 4'd2,
    S_COMPUTE_IFMAP     = 4'd3,
    S_SEND_LAYER_INFO   = 4'd4,
    S_LOAD_WEIGHT       = 4'd5,
    S_LOAD_BIAS         = 4'd6,
    S_SEND_SYSTOLIC     = 4'd7,
    S_SET_IFMAP_O       = 4'd8,
    S_SEND_OPT_MOVE     = 4'd9
  } special_e;

  typedef struct packed {
    logic [2:0]  funct;
    logic        src2_sel;   // 1: immediate is the second operand
    logic        wrd_sel;    // 1: write back main-memory data
    logic        pc_sel;     // branch
    logic        jump_sel;   // jump
    logic [1:0]  rd_group;   // register group written
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [5:0]  rd;
    logic [31:0] imm;        // sign-extended instr[17:6]
    logic [11:0] label;
    logic        special;
    special_e    sp_code;
    logic [5:0]  sp_rd;      // instr[9:4], destination of set_ifmap_o
    logic        reg_we;
  } ctrl_t;

  // Group-0 register map (registers 20..31 are written by the decode instructions).
  localparam int R_ZERO     = 0;
  localparam int R_MOVE_NUM = 1;
  localparam int R_IN_H     = 20;
  localparam int R_IN_W     = 21;
  localparam int R_LAYERS   = 22;
  localparam int R_W_H      = 23;
  localparam int R_W_W      = 24;
  localparam int R_W_ADDR   = 25;
  localparam int R_B_H      = 26;
  localparam int R_B_W      = 27;
  localparam int R_B_ADDR   = 28;
  localparam int R_RELU     = 29;
  localparam int R_OP       = 30;
  localparam int R_FLATTEN  = 31;

  // Main-memory regions.
  localparam logic [11:0] MEM_INFO   = 12'h000;
  localparam logic [11:0] MEM_WEIGHT = 12'h100;
  localparam logic [11:0] MEM_BIAS   = 12'h200;

  // Instruction builders (used by testbenches to assemble programs).
  function automatic logic [31:0] i_rtype(logic [2:0] f, logic [4:0] s1, logic [4:0] s2, logic [5:0] rd);
    return {f, 6'b000000, s1, s2, 7'd0, rd};
  endfunction
  function automatic logic [31:0] i_itype(logic [2:0] f, logic [4:0] s1, logic [11:0] imm, logic [5:0] rd);
    return {f, 6'b100000, s1, imm, rd};
  endfunction
  function automatic logic [31:0] i_branch(logic [2:0] f, logic [4:0] s1, logic [4:0] s2, logic [11:0] lbl);
    return {f, 6'b001000, s1, s2, 1'b0, lbl};
  endfunction
  function automatic logic [31:0] i_jump(logic [11:0] lbl);
    return {9'b111000111, 11'd0, lbl};
  endfunction
  function automatic logic [31:0] i_load(logic [1:0] grp, logic [4:0] s1, logic [11:0] off, logic [5:0] rd);
    return {3'b000, 4'b1100, grp, s1, off, rd};
  endfunction
  function automatic logic [31:0] i_special(special_e c, logic [4:0] s1, logic [4:0] s2, logic [5:0] rd);
    return {9'h1FF, s1, s2, 3'd0, rd, c};
  endfunction

endpackage
