// rv32i_single_cycle: a single-cycle RV32I processor.
//
// Every instruction completes in one clock cycle. Within the cycle the
// instruction flows through five conceptual stages, all combinational
// between the state elements:
//   fetch      instr_mem[PC]; next_pc forms PC + 4
//   decode     decoder splits rd/rs1/rs2 and identifies the instruction;
//              reg_file reads rs1/rs2; imm_gen builds the immediate;
//              control produces the control bundle
//   execute    alu computes on Op1 (Reg 1 or PC) and Op2 (Reg 2 or the
//              immediate); branch_unit compares Reg 1 with Reg 2
//   memory     data_mem is read or written at the ALU result
//   write-back the selected value (PC + 4, ALU result or memory data) is
//              written to rd at the rising clock edge, and the PC takes either
//              PC + 4 or the ALU result (taken branch, jal, jalr)
// The state (PC, registers, data memory) changes only at the rising edge of
// clk. rst_n (active low, synchronous) sets the PC to RESET_PC; registers and
// memories keep their contents. The program is placed in the instruction
// memory by IMEM_INIT (a $readmemh file) or through the imem_load_* port,
// one word per clock, normally while rst_n is low. The debug outputs show the instruction of
// the current cycle and the register and memory writes it will make at the
// next edge.
// The block structure, the selector inputs and the PC selection by
// (branch AND taken) OR jump follow the processor's datapath; memory sizes,
// the reset and the debug outputs are this design's choices.
module rv32i_single_cycle
  import rv32i_pkg::*;
#(
  parameter int          IMEM_WORDS = 1024,
  parameter int          DMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000,
  parameter string       IMEM_INIT  = ""
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction memory load port (word index), used while rst_n is low
  input  logic                          imem_load_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] imem_load_addr,
  input  logic [31:0]                   imem_load_data,
  output logic [31:0] pc_o,
  output logic [31:0] instr_o,
  output logic        rf_we_o,
  output logic [4:0]  rf_wr_idx_o,
  output logic [31:0] rf_wr_data_o,
  output logic        dmem_we_o,
  output logic [31:0] dmem_addr_o,
  output logic [31:0] dmem_wdata_o,
  output logic [3:0]  dmem_mode_o
);
  word_t    pc, pc_nxt, pc_plus, instr, instr_imm, imm;
  word_t    reg1, reg2, op1, op2, alu_res, mem_rdata, wb_data;
  reg_idx_t wr_idx, r1_idx, r2_idx;
  inst_id_t inst_id;
  logic     inc_sel, br_taken;
  ctrl_t    ctrl;

  // ---- fetch --------------------------------------------------------------
  pc_reg #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst_n, .pc_next(pc_nxt), .pc(pc)
  );

  instr_mem #(.WORDS(IMEM_WORDS), .INIT_FILE(IMEM_INIT)) u_imem (
    .clk, .addr(pc), .instr(instr),
    .load_we(imem_load_we), .load_addr(imem_load_addr), .load_data(imem_load_data)
  );

  next_pc u_next_pc (
    .pc, .inc_sel, .alu_res,
    .branch(ctrl.branch), .branch_taken(br_taken), .jump(ctrl.jump),
    .pc_plus, .pc_next(pc_nxt)
  );

  // ---- decode -------------------------------------------------------------
  decoder u_dec (
    .instr, .wr_idx, .r1_idx, .r2_idx, .instr_o(instr_imm), .inst_id, .inc_sel
  );

  imm_gen u_imm (.instr(instr_imm), .inst_id, .imm);

  control u_ctrl (.inst_id, .ctrl);

  reg_file #(.NREGS(32)) u_rf (
    .clk, .r1_idx, .r2_idx, .reg1, .reg2,
    .wr_en(ctrl.reg_wr_en), .wr_idx, .data_in(wb_data)
  );

  // ---- execute ------------------------------------------------------------
  mux #(.N(2), .W(32)) u_op1_mux (.in({reg1, pc}),  .sel(ctrl.op1_sel), .out(op1));
  mux #(.N(2), .W(32)) u_op2_mux (.in({imm, reg2}), .sel(ctrl.op2_sel), .out(op2));

  alu u_alu (.op1, .op2, .ctrl(ctrl.alu_ctrl), .res(alu_res));

  branch_unit u_br (.a(reg1), .b(reg2), .cond(ctrl.br_cond), .taken(br_taken));

  // ---- memory -------------------------------------------------------------
  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(alu_res), .data_in(reg2), .mode(ctrl.mem_mode),
    .wr_en(ctrl.mem_wr_en), .data_out(mem_rdata)
  );

  // ---- write-back ---------------------------------------------------------
  mux #(.N(3), .W(32)) u_wb_mux (
    .in({mem_rdata, alu_res, pc_plus}), .sel(ctrl.wb_sel), .out(wb_data)
  );

  // ---- observation --------------------------------------------------------
  assign pc_o         = pc;
  assign instr_o      = instr;
  assign rf_we_o      = ctrl.reg_wr_en;
  assign rf_wr_idx_o  = wr_idx;
  assign rf_wr_data_o = wb_data;
  assign dmem_we_o    = ctrl.mem_wr_en;
  assign dmem_addr_o  = alu_res;
  assign dmem_wdata_o = reg2;
  assign dmem_mode_o  = ctrl.mem_mode;
endmodule
