// imm_gen: the immediate generator.
//
// Picks the instruction format from the decoded instruction code and builds
// the 32-bit immediate, always sign-extended from instr[31]:
//   I: instr[31:20]                                   (loads, OP-IMM, jalr)
//   S: {instr[31:25], instr[11:7]}                    (stores)
//   B: {instr[31], instr[7], instr[30:25], instr[11:8], 1'b0}  (branches)
//   U: {instr[31:12], 12'b0}                          (lui, auipc)
//   J: {instr[31], instr[19:12], instr[20], instr[30:21], 1'b0} (jal)
// Instructions without an immediate give zero. The bit positions are those
// of the RV32I formats. The opcode bits instr[6:0] are not read: the format
// comes from inst_id, so lint reports them unused. Combinational.
module imm_gen
  import rv32i_pkg::*;
(
  input  logic [31:0] instr,
  input  inst_id_t    inst_id,
  output logic [31:0] imm
);
  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j;

  assign imm_i = {{20{instr[31]}}, instr[31:20]};
  assign imm_s = {{20{instr[31]}}, instr[31:25], instr[11:7]};
  assign imm_b = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
  assign imm_u = {instr[31:12], 12'd0};
  assign imm_j = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};

  always_comb begin
    unique case (inst_id)
      I_JALR, I_LB, I_LH, I_LW, I_LBU, I_LHU,
      I_ADDI, I_SLTI, I_SLTIU, I_XORI, I_ORI, I_ANDI,
      I_SLLI, I_SRLI, I_SRAI:                 imm = imm_i;
      I_SB, I_SH, I_SW:                       imm = imm_s;
      I_BEQ, I_BNE, I_BLT, I_BGE, I_BLTU, I_BGEU: imm = imm_b;
      I_LUI, I_AUIPC:                         imm = imm_u;
      I_JAL:                                  imm = imm_j;
      default:                                imm = 32'd0;
    endcase
  end
endmodule
