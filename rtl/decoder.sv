// decoder: the decode block of the single-cycle RV32I processor.
//
// Splits the instruction into its register specifiers, which sit in the same
// bits in every format (rd = [11:7], rs1 = [19:15], rs2 = [24:20]), and
// identifies the instruction from opcode [6:0], funct3 [14:12] and funct7
// [31:25] as a 6-bit code (inst_id_t) for the immediate generator and the
// control unit. It also passes the instruction word on to the immediate
// generator and drives the PC increment select: 0 (step 4) for a 32-bit
// encoding (instr[1:0] == 2'b11), 1 (step 2) otherwise. Encodings that are
// not RV32I base instructions give I_ILLEGAL. Combinational.
// The outputs and their widths follow the processor's datapath; the 6-bit
// code's encoding is this design's own.
module decoder
  import rv32i_pkg::*;
(
  input  logic [31:0] instr,
  output reg_idx_t    wr_idx,
  output reg_idx_t    r1_idx,
  output reg_idx_t    r2_idx,
  output logic [31:0] instr_o,
  output inst_id_t    inst_id,
  output logic        inc_sel
);
  logic [6:0] opcode;
  logic [2:0] f3;
  logic [6:0] f7;

  assign opcode  = instr[6:0];
  assign f3      = instr[14:12];
  assign f7      = instr[31:25];
  assign wr_idx  = instr[11:7];
  assign r1_idx  = instr[19:15];
  assign r2_idx  = instr[24:20];
  assign instr_o = instr;
  assign inc_sel = (instr[1:0] != 2'b11);

  always_comb begin
    inst_id = I_ILLEGAL;
    unique case (opcode)
      OPC_LUI:   inst_id = I_LUI;
      OPC_AUIPC: inst_id = I_AUIPC;
      OPC_JAL:   inst_id = I_JAL;
      OPC_JALR:  if (f3 == 3'b000) inst_id = I_JALR;
      OPC_BRANCH:
        case (f3)
          3'b000: inst_id = I_BEQ;
          3'b001: inst_id = I_BNE;
          3'b100: inst_id = I_BLT;
          3'b101: inst_id = I_BGE;
          3'b110: inst_id = I_BLTU;
          3'b111: inst_id = I_BGEU;
          default: inst_id = I_ILLEGAL;
        endcase
      OPC_LOAD:
        case (f3)
          3'b000: inst_id = I_LB;
          3'b001: inst_id = I_LH;
          3'b010: inst_id = I_LW;
          3'b100: inst_id = I_LBU;
          3'b101: inst_id = I_LHU;
          default: inst_id = I_ILLEGAL;
        endcase
      OPC_STORE:
        case (f3)
          3'b000: inst_id = I_SB;
          3'b001: inst_id = I_SH;
          3'b010: inst_id = I_SW;
          default: inst_id = I_ILLEGAL;
        endcase
      OPC_OPIMM:
        case (f3)
          3'b000: inst_id = I_ADDI;
          3'b010: inst_id = I_SLTI;
          3'b011: inst_id = I_SLTIU;
          3'b100: inst_id = I_XORI;
          3'b110: inst_id = I_ORI;
          3'b111: inst_id = I_ANDI;
          3'b001: inst_id = (f7 == 7'b0000000) ? I_SLLI : I_ILLEGAL;
          3'b101: inst_id = (f7 == 7'b0000000) ? I_SRLI :
                            (f7 == 7'b0100000) ? I_SRAI : I_ILLEGAL;
          default: inst_id = I_ILLEGAL;
        endcase
      OPC_OP:
        if (f7 == 7'b0000000) begin
          case (f3)
            3'b000: inst_id = I_ADD;
            3'b001: inst_id = I_SLL;
            3'b010: inst_id = I_SLT;
            3'b011: inst_id = I_SLTU;
            3'b100: inst_id = I_XOR;
            3'b101: inst_id = I_SRL;
            3'b110: inst_id = I_OR;
            3'b111: inst_id = I_AND;
            default: inst_id = I_ILLEGAL;
          endcase
        end else if (f7 == 7'b0100000) begin
          case (f3)
            3'b000: inst_id = I_SUB;
            3'b101: inst_id = I_SRA;
            default: inst_id = I_ILLEGAL;
          endcase
        end
      OPC_FENCE: if (f3 == 3'b000) inst_id = I_FENCE;
      OPC_SYSTEM:
        if (instr[31:7] == 25'd0)                    inst_id = I_ECALL;
        else if (instr[31:7] == {12'd1, 13'd0})      inst_id = I_EBREAK;
      default: inst_id = I_ILLEGAL;
    endcase
  end
endmodule
