// tb_control: self-checking test of the control unit.
// For every decoded instruction code the control bundle is compared with a
// table written here from the RV32I semantics of each instruction: which
// state it writes, where the ALU operands come from, which ALU operation,
// memory access and write-back source it needs, and how the PC moves.
// Fields that the instruction does not use are not compared.
module tb_control;
  import rv32i_pkg::*;
  inst_id_t inst_id;
  ctrl_t    ctrl;
  int checks = 0, failures = 0;

  control dut (.inst_id, .ctrl);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected fields; -1 marks "don't care"
  typedef struct {
    int we, op1, op2, alu, mode, mwe, wb, cond, br, j;
  } exp_t;

  function automatic exp_t expect_for(inst_id_t id);
    exp_t e = '{we: 0, op1: -1, op2: -1, alu: -1, mode: -1, mwe: 0, wb: -1, cond: -1, br: 0, j: 0};
    case (id)
      I_ADD:  e = '{1, 1, 0, ALU_ADD,  -1, 0, WB_ALU, -1, 0, 0};
      I_SUB:  e = '{1, 1, 0, ALU_SUB,  -1, 0, WB_ALU, -1, 0, 0};
      I_SLL:  e = '{1, 1, 0, ALU_SLL,  -1, 0, WB_ALU, -1, 0, 0};
      I_SLT:  e = '{1, 1, 0, ALU_SLT,  -1, 0, WB_ALU, -1, 0, 0};
      I_SLTU: e = '{1, 1, 0, ALU_SLTU, -1, 0, WB_ALU, -1, 0, 0};
      I_XOR:  e = '{1, 1, 0, ALU_XOR,  -1, 0, WB_ALU, -1, 0, 0};
      I_SRL:  e = '{1, 1, 0, ALU_SRL,  -1, 0, WB_ALU, -1, 0, 0};
      I_SRA:  e = '{1, 1, 0, ALU_SRA,  -1, 0, WB_ALU, -1, 0, 0};
      I_OR:   e = '{1, 1, 0, ALU_OR,   -1, 0, WB_ALU, -1, 0, 0};
      I_AND:  e = '{1, 1, 0, ALU_AND,  -1, 0, WB_ALU, -1, 0, 0};
      I_ADDI:  e = '{1, 1, 1, ALU_ADD,  -1, 0, WB_ALU, -1, 0, 0};
      I_SLTI:  e = '{1, 1, 1, ALU_SLT,  -1, 0, WB_ALU, -1, 0, 0};
      I_SLTIU: e = '{1, 1, 1, ALU_SLTU, -1, 0, WB_ALU, -1, 0, 0};
      I_XORI:  e = '{1, 1, 1, ALU_XOR,  -1, 0, WB_ALU, -1, 0, 0};
      I_ORI:   e = '{1, 1, 1, ALU_OR,   -1, 0, WB_ALU, -1, 0, 0};
      I_ANDI:  e = '{1, 1, 1, ALU_AND,  -1, 0, WB_ALU, -1, 0, 0};
      I_SLLI:  e = '{1, 1, 1, ALU_SLL,  -1, 0, WB_ALU, -1, 0, 0};
      I_SRLI:  e = '{1, 1, 1, ALU_SRL,  -1, 0, WB_ALU, -1, 0, 0};
      I_SRAI:  e = '{1, 1, 1, ALU_SRA,  -1, 0, WB_ALU, -1, 0, 0};
      I_LB:  e = '{1, 1, 1, ALU_ADD, MEM_B,  0, WB_MEM, -1, 0, 0};
      I_LH:  e = '{1, 1, 1, ALU_ADD, MEM_H,  0, WB_MEM, -1, 0, 0};
      I_LW:  e = '{1, 1, 1, ALU_ADD, MEM_W,  0, WB_MEM, -1, 0, 0};
      I_LBU: e = '{1, 1, 1, ALU_ADD, MEM_BU, 0, WB_MEM, -1, 0, 0};
      I_LHU: e = '{1, 1, 1, ALU_ADD, MEM_HU, 0, WB_MEM, -1, 0, 0};
      I_SB:  e = '{0, 1, 1, ALU_ADD, MEM_B, 1, -1, -1, 0, 0};
      I_SH:  e = '{0, 1, 1, ALU_ADD, MEM_H, 1, -1, -1, 0, 0};
      I_SW:  e = '{0, 1, 1, ALU_ADD, MEM_W, 1, -1, -1, 0, 0};
      I_BEQ:  e = '{0, 0, 1, ALU_ADD, -1, 0, -1, BR_EQ,  1, 0};
      I_BNE:  e = '{0, 0, 1, ALU_ADD, -1, 0, -1, BR_NE,  1, 0};
      I_BLT:  e = '{0, 0, 1, ALU_ADD, -1, 0, -1, BR_LT,  1, 0};
      I_BGE:  e = '{0, 0, 1, ALU_ADD, -1, 0, -1, BR_GE,  1, 0};
      I_BLTU: e = '{0, 0, 1, ALU_ADD, -1, 0, -1, BR_LTU, 1, 0};
      I_BGEU: e = '{0, 0, 1, ALU_ADD, -1, 0, -1, BR_GEU, 1, 0};
      I_JAL:   e = '{1, 0, 1, ALU_ADD,   -1, 0, WB_PC4, -1, 0, 1};
      I_JALR:  e = '{1, 1, 1, ALU_ADD_J, -1, 0, WB_PC4, -1, 0, 1};
      I_LUI:   e = '{1, -1, 1, ALU_PASS_B, -1, 0, WB_ALU, -1, 0, 0};
      I_AUIPC: e = '{1, 0, 1, ALU_ADD, -1, 0, WB_ALU, -1, 0, 0};
      default: ;  // fence, ecall, ebreak, illegal: no writes, no jump
    endcase
    return e;
  endfunction

  task automatic cmp(string name, int got, int exp);
    if (exp < 0) return;
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL id=%0d %s=%0d exp=%0d", inst_id, name, got, exp);
    end
  endtask

  initial begin
    exp_t e;
    for (int id = 0; id < 64; id++) begin
      inst_id = inst_id_t'(id);
      #1;
      e = expect_for(inst_id);
      cmp("reg_wr_en", int'(ctrl.reg_wr_en), e.we);
      cmp("op1_sel",   int'(ctrl.op1_sel),   e.op1);
      cmp("op2_sel",   int'(ctrl.op2_sel),   e.op2);
      cmp("alu_ctrl",  int'(ctrl.alu_ctrl),  e.alu);
      cmp("mem_mode",  int'(ctrl.mem_mode),  e.mode);
      cmp("mem_wr_en", int'(ctrl.mem_wr_en), e.mwe);
      cmp("wb_sel",    int'(ctrl.wb_sel),    e.wb);
      cmp("br_cond",   int'(ctrl.br_cond),   e.cond);
      cmp("branch",    int'(ctrl.branch),    e.br);
      cmp("jump",      int'(ctrl.jump),      e.j);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
