// rv32i_asm_pkg: RV32I instruction encoders for the testbenches.
// Each function returns the 32-bit machine word of one instruction, built
// from the field layout of the R, I, S, B, U and J formats.
package rv32i_asm_pkg;

  function automatic logic [31:0] r_type(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                         logic [2:0] f3, logic [4:0] rd, logic [6:0] opc);
    return {f7, rs2, rs1, f3, rd, opc};
  endfunction

  function automatic logic [31:0] i_type(int imm, logic [4:0] rs1, logic [2:0] f3,
                                         logic [4:0] rd, logic [6:0] opc);
    logic [11:0] i = 12'(imm);
    return {i, rs1, f3, rd, opc};
  endfunction

  function automatic logic [31:0] s_type(int imm, logic [4:0] rs2, logic [4:0] rs1, logic [2:0] f3);
    logic [11:0] i = 12'(imm);
    return {i[11:5], rs2, rs1, f3, i[4:0], 7'b0100011};
  endfunction

  function automatic logic [31:0] b_type(int imm, logic [4:0] rs2, logic [4:0] rs1, logic [2:0] f3);
    logic [12:0] i = 13'(imm);
    return {i[12], i[10:5], rs2, rs1, f3, i[4:1], i[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] u_type(logic [19:0] imm20, logic [4:0] rd, logic [6:0] opc);
    return {imm20, rd, opc};
  endfunction

  function automatic logic [31:0] j_type(int imm, logic [4:0] rd);
    logic [20:0] i = 21'(imm);
    return {i[20], i[10:1], i[11], i[19:12], rd, 7'b1101111};
  endfunction

  // mnemonics
  function automatic logic [31:0] ADD (logic [4:0] rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SUB (logic [4:0] rd, rs1, rs2); return r_type(7'h20, rs2, rs1, 3'd0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLL (logic [4:0] rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd1, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLT (logic [4:0] rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd2, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLTU(logic [4:0] rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd3, rd, 7'b0110011); endfunction
  function automatic logic [31:0] XOR (logic [4:0] rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd4, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SRL (logic [4:0] rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd5, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SRA (logic [4:0] rd, rs1, rs2); return r_type(7'h20, rs2, rs1, 3'd5, rd, 7'b0110011); endfunction
  function automatic logic [31:0] OR  (logic [4:0] rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd6, rd, 7'b0110011); endfunction
  function automatic logic [31:0] AND (logic [4:0] rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'd7, rd, 7'b0110011); endfunction

  function automatic logic [31:0] ADDI (logic [4:0] rd, rs1, int imm); return i_type(imm, rs1, 3'd0, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLTI (logic [4:0] rd, rs1, int imm); return i_type(imm, rs1, 3'd2, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLTIU(logic [4:0] rd, rs1, int imm); return i_type(imm, rs1, 3'd3, rd, 7'b0010011); endfunction
  function automatic logic [31:0] XORI (logic [4:0] rd, rs1, int imm); return i_type(imm, rs1, 3'd4, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ORI  (logic [4:0] rd, rs1, int imm); return i_type(imm, rs1, 3'd6, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ANDI (logic [4:0] rd, rs1, int imm); return i_type(imm, rs1, 3'd7, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLLI (logic [4:0] rd, rs1, int sh);  return i_type(sh & 31, rs1, 3'd1, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SRLI (logic [4:0] rd, rs1, int sh);  return i_type(sh & 31, rs1, 3'd5, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SRAI (logic [4:0] rd, rs1, int sh);  return i_type((sh & 31) | 32'h400, rs1, 3'd5, rd, 7'b0010011); endfunction

  function automatic logic [31:0] LB (logic [4:0] rd, rs1, int imm); return i_type(imm, rs1, 3'd0, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LH (logic [4:0] rd, rs1, int imm); return i_type(imm, rs1, 3'd1, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LW (logic [4:0] rd, rs1, int imm); return i_type(imm, rs1, 3'd2, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LBU(logic [4:0] rd, rs1, int imm); return i_type(imm, rs1, 3'd4, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LHU(logic [4:0] rd, rs1, int imm); return i_type(imm, rs1, 3'd5, rd, 7'b0000011); endfunction
  function automatic logic [31:0] SB (logic [4:0] rs2, rs1, int imm); return s_type(imm, rs2, rs1, 3'd0); endfunction
  function automatic logic [31:0] SH (logic [4:0] rs2, rs1, int imm); return s_type(imm, rs2, rs1, 3'd1); endfunction
  function automatic logic [31:0] SW (logic [4:0] rs2, rs1, int imm); return s_type(imm, rs2, rs1, 3'd2); endfunction

  function automatic logic [31:0] BEQ (logic [4:0] rs1, rs2, int off); return b_type(off, rs2, rs1, 3'd0); endfunction
  function automatic logic [31:0] BNE (logic [4:0] rs1, rs2, int off); return b_type(off, rs2, rs1, 3'd1); endfunction
  function automatic logic [31:0] BLT (logic [4:0] rs1, rs2, int off); return b_type(off, rs2, rs1, 3'd4); endfunction
  function automatic logic [31:0] BGE (logic [4:0] rs1, rs2, int off); return b_type(off, rs2, rs1, 3'd5); endfunction
  function automatic logic [31:0] BLTU(logic [4:0] rs1, rs2, int off); return b_type(off, rs2, rs1, 3'd6); endfunction
  function automatic logic [31:0] BGEU(logic [4:0] rs1, rs2, int off); return b_type(off, rs2, rs1, 3'd7); endfunction

  function automatic logic [31:0] LUI  (logic [4:0] rd, logic [19:0] imm20); return u_type(imm20, rd, 7'b0110111); endfunction
  function automatic logic [31:0] AUIPC(logic [4:0] rd, logic [19:0] imm20); return u_type(imm20, rd, 7'b0010111); endfunction
  function automatic logic [31:0] JAL  (logic [4:0] rd, int off); return j_type(off, rd); endfunction
  function automatic logic [31:0] JALR (logic [4:0] rd, rs1, int imm); return i_type(imm, rs1, 3'd0, rd, 7'b1100111); endfunction

  localparam logic [31:0] FENCE  = 32'h0ff0_000f;
  localparam logic [31:0] ECALL  = 32'h0000_0073;
  localparam logic [31:0] EBREAK = 32'h0010_0073;

endpackage
