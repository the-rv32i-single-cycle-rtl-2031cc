// tb_decoder: self-checking test of the instruction decoder.
// Every RV32I base instruction is encoded with random register fields and
// immediates; the decoder must name it and return rd/rs1/rs2 from their
// fixed positions. Malformed encodings must give I_ILLEGAL, and the
// increment select must flag encodings whose low two bits are not 2'b11.
module tb_decoder;
  import rv32i_pkg::*;
  import rv32i_asm_pkg::*;
  logic [31:0] instr, instr_o;
  reg_idx_t    wr_idx, r1_idx, r2_idx;
  inst_id_t    inst_id;
  logic        inc_sel;
  int checks = 0, failures = 0;

  decoder dut (.instr, .wr_idx, .r1_idx, .r2_idx, .instr_o, .inst_id, .inc_sel);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] ins, inst_id_t exp);
    instr = ins;
    #1;
    checks++;
    if (inst_id !== exp || wr_idx !== ins[11:7] || r1_idx !== ins[19:15] ||
        r2_idx !== ins[24:20] || instr_o !== ins || inc_sel !== (ins[1:0] != 2'b11)) begin
      failures++;
      $display("FAIL instr=%h id=%0d exp=%0d rd=%0d rs1=%0d rs2=%0d inc=%b",
               ins, inst_id, exp, wr_idx, r1_idx, r2_idx, inc_sel);
    end
  endtask

  initial begin
    logic [4:0] d, s1, s2;
    int v;
    repeat (60) begin
      d = 5'($urandom); s1 = 5'($urandom); s2 = 5'($urandom); v = $urandom_range(0, 4095) - 2048;
      chk(LUI(d, 20'($urandom)), I_LUI);   chk(AUIPC(d, 20'($urandom)), I_AUIPC);
      chk(JAL(d, 2 * v), I_JAL);           chk(JALR(d, s1, v), I_JALR);
      chk(BEQ(s1, s2, 2 * v), I_BEQ);      chk(BNE(s1, s2, 2 * v), I_BNE);
      chk(BLT(s1, s2, 2 * v), I_BLT);      chk(BGE(s1, s2, 2 * v), I_BGE);
      chk(BLTU(s1, s2, 2 * v), I_BLTU);    chk(BGEU(s1, s2, 2 * v), I_BGEU);
      chk(LB(d, s1, v), I_LB);   chk(LH(d, s1, v), I_LH);   chk(LW(d, s1, v), I_LW);
      chk(LBU(d, s1, v), I_LBU); chk(LHU(d, s1, v), I_LHU);
      chk(SB(s2, s1, v), I_SB);  chk(SH(s2, s1, v), I_SH);  chk(SW(s2, s1, v), I_SW);
      chk(ADDI(d, s1, v), I_ADDI);   chk(SLTI(d, s1, v), I_SLTI); chk(SLTIU(d, s1, v), I_SLTIU);
      chk(XORI(d, s1, v), I_XORI);   chk(ORI(d, s1, v), I_ORI);   chk(ANDI(d, s1, v), I_ANDI);
      chk(SLLI(d, s1, v), I_SLLI);   chk(SRLI(d, s1, v), I_SRLI); chk(SRAI(d, s1, v), I_SRAI);
      chk(ADD(d, s1, s2), I_ADD);    chk(SUB(d, s1, s2), I_SUB);  chk(SLL(d, s1, s2), I_SLL);
      chk(SLT(d, s1, s2), I_SLT);    chk(SLTU(d, s1, s2), I_SLTU); chk(XOR(d, s1, s2), I_XOR);
      chk(SRL(d, s1, s2), I_SRL);    chk(SRA(d, s1, s2), I_SRA);  chk(OR(d, s1, s2), I_OR);
      chk(AND(d, s1, s2), I_AND);
    end
    chk(FENCE, I_FENCE); chk(ECALL, I_ECALL); chk(EBREAK, I_EBREAK);
    // malformed encodings
    chk(r_type(7'h20, 5'd1, 5'd2, 3'd1, 5'd3, 7'b0110011), I_ILLEGAL);  // sub-style sll
    chk(r_type(7'h01, 5'd1, 5'd2, 3'd0, 5'd3, 7'b0110011), I_ILLEGAL);  // funct7 = 1
    chk(i_type(0, 5'd1, 3'd3, 5'd2, 7'b0000011), I_ILLEGAL);            // load funct3 = 3
    chk(s_type(0, 5'd1, 5'd2, 3'd4), I_ILLEGAL);                        // store funct3 = 4
    chk(b_type(8, 5'd1, 5'd2, 3'd2), I_ILLEGAL);                        // branch funct3 = 2
    chk(i_type(0, 5'd1, 3'd1, 5'd2, 7'b1100111), I_ILLEGAL);            // jalr funct3 = 1
    chk(i_type(32'h420, 5'd1, 3'd1, 5'd2, 7'b0010011), I_ILLEGAL);      // slli with funct7 set
    chk(32'h0000_0000, I_ILLEGAL);
    chk(32'h0000_4501, I_ILLEGAL);                                      // 16-bit encoding
    chk(32'hffff_ffff, I_ILLEGAL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
