// Single-cycle processor of the tiny TPU.
//
// Every ordinary instruction completes in the cycle it is fetched: the decoder drives
// the selects, the ALU computes reg[src1] op (src2_sel ? imm : reg[src2]), loads read
// main memory at reg[src1] + offset (wrd_sel picks memory data for write-back into the
// group named by rd_group), a taken branch (pc_sel) or a jump (jump_sel) loads the
// label into the PC. Sources are registers 0..31 of group 0.
// Special instructions:
//   decode_layer        split reg[src1] (height [31:28], width [27:24], layer count
//                       [23:20]) into registers 20..22, one cycle
//   decode_layer_info   split reg[src1] (Table-II style layer record) into registers
//                       23..31, storing kernel sizes as field+1, one cycle
//   send_optimal_move   res_valid with value = reg[src1] saturated to 8 bits signed and
//                       index = reg[src2][7:0], one cycle
//   all others          handed to the layer engine; the PC holds until it reports done;
//                       set_ifmap_o then writes the engine result into group-0 register
//                       instr[9:4]
// A program waits for work with a branch to itself while the move count is zero.
// The single-cycle organisation, the select signals and the encoding follow the
// description; the register numbers and special-operand fields are this design's.
module tpu_core
  import onechan_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  output logic [11:0] pc,
  input  logic [31:0] instr,
  // register file
  output logic [4:0]  ra1,
  output logic [4:0]  ra2,
  input  logic [31:0] rd1,
  input  logic [31:0] rd2,
  output logic        rf_we,
  output logic [1:0]  rf_group,
  output logic [5:0]  rf_addr,
  output logic [31:0] rf_data,
  output logic        lnum_we,
  output logic [31:0] lnum  [3],
  output logic        linfo_we,
  output logic [31:0] linfo [9],
  // main memory
  output logic [11:0] mem_addr,
  input  logic [31:0] mem_data,
  // layer engine
  output logic        eng_start,
  output special_e    eng_code,
  output logic [31:0] eng_opnd,
  input  logic        eng_done,
  input  logic [31:0] eng_res,
  // result towards the packet interface
  output logic        res_valid,
  output logic [7:0]  res_value,
  output logic [7:0]  res_index
);

  ctrl_t       c;
  logic [31:0] b, y;
  logic        taken, waiting, to_engine;
  logic [11:0] pc_next;

  tpu_decoder u_dec (.instr(instr), .c(c));
  tpu_alu     u_alu (.funct(c.funct), .a(rd1), .b(b), .y(y), .taken(taken));

  assign ra1       = c.rs1;
  assign ra2       = c.rs2;
  assign b         = c.src2_sel ? c.imm : rd2;
  assign mem_addr  = y[11:0];
  assign to_engine = c.special && !(c.sp_code inside {S_DECODE_LAYER, S_DECODE_LAYER_INFO, S_SEND_OPT_MOVE});
  assign eng_start = to_engine && !waiting;
  assign eng_code  = c.sp_code;
  assign eng_opnd  = rd1;

  always_comb begin
    rf_we    = 1'b0;
    rf_group = c.rd_group;
    rf_addr  = c.rd;
    rf_data  = c.wrd_sel ? mem_data : y;
    if (!c.special) begin
      rf_we = c.reg_we;
    end else if (c.sp_code == S_SET_IFMAP_O && waiting && eng_done) begin
      rf_we    = 1'b1;
      rf_group = 2'd0;
      rf_addr  = c.sp_rd;
      rf_data  = eng_res;
    end

    lnum_we  = c.special && c.sp_code == S_DECODE_LAYER;
    lnum[0]  = {28'd0, rd1[31:28]};
    lnum[1]  = {28'd0, rd1[27:24]};
    lnum[2]  = {28'd0, rd1[23:20]};

    linfo_we = c.special && c.sp_code == S_DECODE_LAYER_INFO;
    linfo[0] = 32'(rd1[31:29]) + 32'd1;
    linfo[1] = 32'(rd1[28:26]) + 32'd1;
    linfo[2] = 32'(rd1[25:18]);
    linfo[3] = 32'(rd1[17:15]) + 32'd1;
    linfo[4] = 32'(rd1[14:12]) + 32'd1;
    linfo[5] = 32'(rd1[11:4]);
    linfo[6] = 32'(rd1[3]);
    linfo[7] = 32'(rd1[2]);
    linfo[8] = 32'(rd1[1]);

    res_valid = c.special && c.sp_code == S_SEND_OPT_MOVE;
    res_value = ($signed(rd1) > 32'sd127)  ? 8'h7F :
                ($signed(rd1) < -32'sd128) ? 8'h80 : rd1[7:0];
    res_index = rd2[7:0];

    if (c.jump_sel)                 pc_next = c.label;
    else if (c.pc_sel && taken)     pc_next = c.label;
    else if (to_engine && !(waiting && eng_done)) pc_next = pc;
    else                            pc_next = pc + 12'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      waiting <= 1'b0;
    end else begin
      pc <= pc_next;
      if (eng_start)     waiting <= 1'b1;
      else if (eng_done) waiting <= 1'b0;
    end
  end

endmodule
