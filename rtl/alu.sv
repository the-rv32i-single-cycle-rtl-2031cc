// alu: the arithmetic-logic unit of the execute stage.
//
// res = op1 <ctrl> op2 for the RV32I operations: add, sub, sll, slt, sltu,
// xor, srl, sra, or, and (shift amounts are op2[4:0]). Two further
// operations serve the datapath: ALU_PASS_B returns op2 (lui, whose
// immediate is the result) and ALU_ADD_J returns (op1 + op2) with bit 0
// cleared (the jalr target). The ALU also computes load/store addresses and
// branch/jump targets with ALU_ADD. Combinational. The operation set follows
// the instruction set and the jalr rule; the 5-bit encoding is this design's.
module alu
  import rv32i_pkg::*;
(
  input  logic [31:0] op1,
  input  logic [31:0] op2,
  input  alu_op_t     ctrl,
  output logic [31:0] res
);
  logic [31:0] sum;
  logic [4:0]  shamt;

  assign sum   = op1 + op2;
  assign shamt = op2[4:0];

  always_comb begin
    unique case (ctrl)
      ALU_ADD:    res = sum;
      ALU_SUB:    res = op1 - op2;
      ALU_SLL:    res = op1 << shamt;
      ALU_SLT:    res = {31'd0, $signed(op1) < $signed(op2)};
      ALU_SLTU:   res = {31'd0, op1 < op2};
      ALU_XOR:    res = op1 ^ op2;
      ALU_SRL:    res = op1 >> shamt;
      ALU_SRA:    res = 32'($signed(op1) >>> shamt);
      ALU_OR:     res = op1 | op2;
      ALU_AND:    res = op1 & op2;
      ALU_PASS_B: res = op2;
      ALU_ADD_J:  res = {sum[31:1], 1'b0};
      default:    res = sum;
    endcase
  end
endmodule
