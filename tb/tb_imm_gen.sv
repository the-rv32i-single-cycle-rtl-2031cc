// tb_imm_gen: self-checking test of the immediate generator.
// Random immediates are encoded into instructions of every format with the
// assembler package (random register fields around them); the generator must
// return the original value, sign-extended. Instructions without an
// immediate must give zero.
module tb_imm_gen;
  import rv32i_pkg::*;
  import rv32i_asm_pkg::*;
  logic [31:0] instr, imm;
  inst_id_t    inst_id;
  int checks = 0, failures = 0;

  imm_gen dut (.instr, .inst_id, .imm);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] ins, inst_id_t id, logic [31:0] exp, string fmt);
    instr = ins; inst_id = id;
    #1;
    checks++;
    if (imm !== exp) begin
      failures++;
      $display("FAIL %s instr=%h imm=%h exp=%h", fmt, ins, imm, exp);
    end
  endtask

  initial begin
    int v;
    logic [4:0] a, b;
    repeat (300) begin
      a = 5'($urandom); b = 5'($urandom);
      v = $urandom_range(0, 4095) - 2048;                 // I: -2048..2047
      chk(ADDI(a, b, v), I_ADDI, 32'(v), "I");
      chk(LW(a, b, v),   I_LW,   32'(v), "I-load");
      chk(JALR(a, b, v), I_JALR, 32'(v), "I-jalr");
      chk(SW(a, b, v),   I_SW,   32'(v), "S");
      chk(SB(a, b, v),   I_SB,   32'(v), "S");
      v = 2 * ($urandom_range(0, 4095) - 2048);           // B: even, +/-4 KiB
      chk(BNE(a, b, v),  I_BNE,  32'(v), "B");
      chk(BGEU(a, b, v), I_BGEU, 32'(v), "B");
      v = 2 * ($urandom_range(0, 1048575) - 524288);      // J: even, +/-1 MiB
      chk(JAL(a, v),     I_JAL,  32'(v), "J");
      v = $urandom;
      chk(LUI(a, 20'(v)),   I_LUI,   {v[19:0], 12'd0}, "U");
      chk(AUIPC(a, 20'(v)), I_AUIPC, {v[19:0], 12'd0}, "U");
      chk(ADD(a, b, 5'(v)), I_ADD,   32'd0, "R");
    end
    // extremes
    chk(ADDI(1, 2, -2048), I_ADDI, 32'hffff_f800, "I min");
    chk(ADDI(1, 2, 2047),  I_ADDI, 32'h0000_07ff, "I max");
    chk(BEQ(1, 2, -4096),  I_BEQ,  32'hffff_f000, "B min");
    chk(BEQ(1, 2, 4094),   I_BEQ,  32'h0000_0ffe, "B max");
    chk(JAL(1, -1048576),  I_JAL,  32'hfff0_0000, "J min");
    chk(JAL(1, 1048574),   I_JAL,  32'h000f_fffe, "J max");
    chk(SRAI(3, 4, 31),    I_SRAI, 32'h0000_041f, "I shift");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
