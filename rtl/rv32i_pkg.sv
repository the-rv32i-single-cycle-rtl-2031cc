// rv32i_pkg: types and constants shared by the blocks of the single-cycle
// RV32I processor.
//
// It holds the instruction field positions (fixed across all RV32I formats),
// the 6-bit decoded-instruction code that the decoder hands to the immediate
// generator and to the control unit, and the encodings of the control signals:
// the 5-bit ALU operation, the 4-bit data-memory access mode, the 3-bit branch
// condition, the 2-bit write-back select and the control bundle itself.
// The field positions and the RV32I opcodes are those of the instruction set;
// the encodings of the decoded-instruction code, the ALU operation and the
// memory mode are this design's own choice (branch condition and memory mode
// reuse funct3 so that they read naturally).
package rv32i_pkg;

  localparam int XLEN = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  // Major opcodes, instr[6:0]
  localparam logic [6:0] OPC_LUI    = 7'b0110111;
  localparam logic [6:0] OPC_AUIPC  = 7'b0010111;
  localparam logic [6:0] OPC_JAL    = 7'b1101111;
  localparam logic [6:0] OPC_JALR   = 7'b1100111;
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;
  localparam logic [6:0] OPC_OPIMM  = 7'b0010011;
  localparam logic [6:0] OPC_OP     = 7'b0110011;
  localparam logic [6:0] OPC_FENCE  = 7'b0001111;
  localparam logic [6:0] OPC_SYSTEM = 7'b1110011;

  // Decoded instruction: one code per RV32I base instruction (6 bits wide,
  // as the decoder-to-control bus).
  typedef enum logic [5:0] {
    I_ILLEGAL = 6'd0,
    I_LUI, I_AUIPC, I_JAL, I_JALR,
    I_BEQ, I_BNE, I_BLT, I_BGE, I_BLTU, I_BGEU,
    I_LB, I_LH, I_LW, I_LBU, I_LHU,
    I_SB, I_SH, I_SW,
    I_ADDI, I_SLTI, I_SLTIU, I_XORI, I_ORI, I_ANDI, I_SLLI, I_SRLI, I_SRAI,
    I_ADD, I_SUB, I_SLL, I_SLT, I_SLTU, I_XOR, I_SRL, I_SRA, I_OR, I_AND,
    I_FENCE, I_ECALL, I_EBREAK
  } inst_id_t;

  // ALU operation (5-bit ALU control input)
  typedef enum logic [4:0] {
    ALU_ADD     = 5'd0,
    ALU_SUB     = 5'd1,
    ALU_SLL     = 5'd2,
    ALU_SLT     = 5'd3,
    ALU_SLTU    = 5'd4,
    ALU_XOR     = 5'd5,
    ALU_SRL     = 5'd6,
    ALU_SRA     = 5'd7,
    ALU_OR      = 5'd8,
    ALU_AND     = 5'd9,
    ALU_PASS_B  = 5'd10,  // result = op2 (lui)
    ALU_ADD_J   = 5'd11   // result = (op1 + op2) & ~1 (jalr target)
  } alu_op_t;

  // Data memory access mode (4 bits): {1'b0, unsigned, size[1:0]}, i.e. the
  // load/store funct3 zero-extended.
  typedef enum logic [3:0] {
    MEM_B  = 4'b0000,
    MEM_H  = 4'b0001,
    MEM_W  = 4'b0010,
    MEM_BU = 4'b0100,
    MEM_HU = 4'b0101
  } mem_mode_t;

  // Branch condition (3 bits): the branch funct3.
  typedef enum logic [2:0] {
    BR_EQ  = 3'b000,
    BR_NE  = 3'b001,
    BR_LT  = 3'b100,
    BR_GE  = 3'b101,
    BR_LTU = 3'b110,
    BR_GEU = 3'b111
  } br_cond_t;

  // Write-back select, in the order of the write-back mux inputs
  typedef enum logic [1:0] {
    WB_PC4 = 2'd0,   // PC + increment (jal, jalr return address)
    WB_ALU = 2'd1,   // ALU result
    WB_MEM = 2'd2    // data memory read data (loads)
  } wb_sel_t;

  // Operand selects, in the order of the operand mux inputs
  localparam logic OP1_PC   = 1'b0;
  localparam logic OP1_REG  = 1'b1;
  localparam logic OP2_REG  = 1'b0;
  localparam logic OP2_IMM  = 1'b1;

  // Control bundle produced by the control unit each cycle
  typedef struct packed {
    logic      reg_wr_en;  // write rd
    logic      op1_sel;    // OP1_PC / OP1_REG
    logic      op2_sel;    // OP2_REG / OP2_IMM
    alu_op_t   alu_ctrl;
    mem_mode_t mem_mode;
    logic      mem_wr_en;  // store
    wb_sel_t   wb_sel;
    br_cond_t  br_cond;
    logic      branch;     // conditional branch: PC <- ALU result if taken
    logic      jump;       // jal/jalr: PC <- ALU result
  } ctrl_t;

endpackage
