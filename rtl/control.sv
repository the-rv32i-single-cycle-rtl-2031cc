// control: the control unit of the single-cycle RV32I processor.
//
// A combinational table from the decoded instruction code to the control
// bundle (ctrl_t) that steers the datapath in the same cycle:
//   R-type      rd <- rs1 OP rs2            op1 = reg, op2 = reg, wb = ALU
//   I-type ALU  rd <- rs1 OP imm            op1 = reg, op2 = imm, wb = ALU
//   loads       rd <- mem[rs1 + imm]        ALU adds, wb = memory
//   stores      mem[rs1 + imm] <- rs2       ALU adds, memory write
//   branches    PC <- PC + imm if taken     op1 = PC, op2 = imm, branch
//   jal         rd <- PC+4, PC <- PC + imm  op1 = PC, op2 = imm, jump
//   jalr        rd <- PC+4, PC <- (rs1 + imm) & ~1            jump
//   lui         rd <- imm                   ALU passes op2
//   auipc       rd <- PC + imm              op1 = PC, op2 = imm
// fence, ecall, ebreak and unknown encodings write nothing and fall through
// to the next instruction; that treatment is this design's choice. The set
// of signals follows the processor's datapath; their encodings are defined
// in rv32i_pkg.
module control
  import rv32i_pkg::*;
(
  input  inst_id_t inst_id,
  output ctrl_t    ctrl
);
  always_comb begin
    ctrl           = '0;
    ctrl.op1_sel   = OP1_REG;
    ctrl.op2_sel   = OP2_REG;
    ctrl.alu_ctrl  = ALU_ADD;
    ctrl.mem_mode  = MEM_W;
    ctrl.wb_sel    = WB_ALU;
    ctrl.br_cond   = BR_EQ;

    unique case (inst_id)
      // register-register
      I_ADD, I_SUB, I_SLL, I_SLT, I_SLTU, I_XOR, I_SRL, I_SRA, I_OR, I_AND: begin
        ctrl.reg_wr_en = 1'b1;
        unique case (inst_id)
          I_SUB:   ctrl.alu_ctrl = ALU_SUB;
          I_SLL:   ctrl.alu_ctrl = ALU_SLL;
          I_SLT:   ctrl.alu_ctrl = ALU_SLT;
          I_SLTU:  ctrl.alu_ctrl = ALU_SLTU;
          I_XOR:   ctrl.alu_ctrl = ALU_XOR;
          I_SRL:   ctrl.alu_ctrl = ALU_SRL;
          I_SRA:   ctrl.alu_ctrl = ALU_SRA;
          I_OR:    ctrl.alu_ctrl = ALU_OR;
          I_AND:   ctrl.alu_ctrl = ALU_AND;
          default: ctrl.alu_ctrl = ALU_ADD;
        endcase
      end
      // register-immediate
      I_ADDI, I_SLTI, I_SLTIU, I_XORI, I_ORI, I_ANDI, I_SLLI, I_SRLI, I_SRAI: begin
        ctrl.reg_wr_en = 1'b1;
        ctrl.op2_sel   = OP2_IMM;
        unique case (inst_id)
          I_SLTI:  ctrl.alu_ctrl = ALU_SLT;
          I_SLTIU: ctrl.alu_ctrl = ALU_SLTU;
          I_XORI:  ctrl.alu_ctrl = ALU_XOR;
          I_ORI:   ctrl.alu_ctrl = ALU_OR;
          I_ANDI:  ctrl.alu_ctrl = ALU_AND;
          I_SLLI:  ctrl.alu_ctrl = ALU_SLL;
          I_SRLI:  ctrl.alu_ctrl = ALU_SRL;
          I_SRAI:  ctrl.alu_ctrl = ALU_SRA;
          default: ctrl.alu_ctrl = ALU_ADD;
        endcase
      end
      // loads
      I_LB, I_LH, I_LW, I_LBU, I_LHU: begin
        ctrl.reg_wr_en = 1'b1;
        ctrl.op2_sel   = OP2_IMM;
        ctrl.wb_sel    = WB_MEM;
        unique case (inst_id)
          I_LB:    ctrl.mem_mode = MEM_B;
          I_LH:    ctrl.mem_mode = MEM_H;
          I_LBU:   ctrl.mem_mode = MEM_BU;
          I_LHU:   ctrl.mem_mode = MEM_HU;
          default: ctrl.mem_mode = MEM_W;
        endcase
      end
      // stores
      I_SB, I_SH, I_SW: begin
        ctrl.op2_sel   = OP2_IMM;
        ctrl.mem_wr_en = 1'b1;
        unique case (inst_id)
          I_SB:    ctrl.mem_mode = MEM_B;
          I_SH:    ctrl.mem_mode = MEM_H;
          default: ctrl.mem_mode = MEM_W;
        endcase
      end
      // conditional branches: target PC + imm from the ALU
      I_BEQ, I_BNE, I_BLT, I_BGE, I_BLTU, I_BGEU: begin
        ctrl.op1_sel = OP1_PC;
        ctrl.op2_sel = OP2_IMM;
        ctrl.branch  = 1'b1;
        unique case (inst_id)
          I_BNE:   ctrl.br_cond = BR_NE;
          I_BLT:   ctrl.br_cond = BR_LT;
          I_BGE:   ctrl.br_cond = BR_GE;
          I_BLTU:  ctrl.br_cond = BR_LTU;
          I_BGEU:  ctrl.br_cond = BR_GEU;
          default: ctrl.br_cond = BR_EQ;
        endcase
      end
      I_JAL: begin
        ctrl.reg_wr_en = 1'b1;
        ctrl.op1_sel   = OP1_PC;
        ctrl.op2_sel   = OP2_IMM;
        ctrl.wb_sel    = WB_PC4;
        ctrl.jump      = 1'b1;
      end
      I_JALR: begin
        ctrl.reg_wr_en = 1'b1;
        ctrl.op2_sel   = OP2_IMM;
        ctrl.alu_ctrl  = ALU_ADD_J;
        ctrl.wb_sel    = WB_PC4;
        ctrl.jump      = 1'b1;
      end
      I_LUI: begin
        ctrl.reg_wr_en = 1'b1;
        ctrl.op2_sel   = OP2_IMM;
        ctrl.alu_ctrl  = ALU_PASS_B;
      end
      I_AUIPC: begin
        ctrl.reg_wr_en = 1'b1;
        ctrl.op1_sel   = OP1_PC;
        ctrl.op2_sel   = OP2_IMM;
      end
      default: ;  // fence, ecall, ebreak, illegal: no state change
    endcase
  end
endmodule
