// tb_rv32i_single_cycle: end-to-end test of the single-cycle processor at
// its default parameters.
//
// The testbench assembles a program into the instruction memory:
//   1. a directed part that walks through the worked examples of the
//      processor description (addi, add, sw, lw, auipc, jalr with an odd
//      target), with hand-computed results;
//   2. a prologue that gives every register a random value and fills a
//      256-byte data region with random words;
//   3. a random body using every RV32I instruction: forward branches and
//      jumps, jalr, byte/half/word loads and stores inside the region, and a
//      counted backward loop;
//   4. a final self-loop (jal x0, 0).
// The program is written through the instruction-memory load port while the
// processor is held in reset.
// An instruction-set model written here runs in lock-step with the
// processor: every cycle the PC, the instruction, the register write and the
// memory write the processor is about to make are compared with the model's,
// so each instruction must complete in exactly one cycle. The test also
// counts how often each instruction and each datapath mechanism was used (a
// taken and a not-taken branch, a jump, a jalr target with bit 0 cleared, a
// discarded write to x0, sign- and zero-extended loads, a partial store) and
// counts a failure for any that never happened.
module tb_rv32i_single_cycle;
  import rv32i_asm_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [31:0] pc_o, instr_o, rf_wr_data_o, dmem_addr_o, dmem_wdata_o;
  logic        rf_we_o, dmem_we_o;
  logic [4:0]  rf_wr_idx_o;
  logic [3:0]  dmem_mode_o;
  logic        imem_load_we = 0;
  logic [9:0]  imem_load_addr = 0;
  logic [31:0] imem_load_data = 0;

  rv32i_single_cycle dut (
    .clk, .rst_n, .imem_load_we, .imem_load_addr, .imem_load_data, .pc_o, .instr_o, .rf_we_o, .rf_wr_idx_o, .rf_wr_data_o,
    .dmem_we_o, .dmem_addr_o, .dmem_wdata_o, .dmem_mode_o
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  localparam int MAX_CYCLES = 20000;

  initial begin
    wait (cycles == MAX_CYCLES);
    failures++;
    $display("watchdog: processor did not reach the end of the program");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // program assembly
  // ------------------------------------------------------------------
  localparam int IMEM_WORDS = 1024;
  localparam int BODY_LEN   = 600;
  localparam int REGION     = 32'h400;      // data region base, 256 bytes
  logic [31:0] prog [IMEM_WORDS];
  int          n = 0;
  int          end_pc;

  function automatic void emit(logic [31:0] w);
    prog[n] = w;
    n++;
  endfunction

  // random register for sources / destinations of the random body
  // (x28 loop counter, x29 jalr base, x30 region base are kept out)
  function automatic logic [4:0] rsrc();  return 5'($urandom_range(0, 27)); endfunction
  function automatic logic [4:0] rdst();  return ($urandom_range(0, 9) == 0) ? 5'd0 : 5'($urandom_range(1, 27)); endfunction
  function automatic int simm();          return $urandom_range(0, 4095) - 2048; endfunction

  function automatic logic [31:0] rand_alu();
    logic [4:0] d = rdst(), a = rsrc(), b = rsrc();
    case ($urandom_range(0, 18))
      0: return ADD(d, a, b);   1: return SUB(d, a, b);   2: return SLL(d, a, b);
      3: return SLT(d, a, b);   4: return SLTU(d, a, b);  5: return XOR(d, a, b);
      6: return SRL(d, a, b);   7: return SRA(d, a, b);   8: return OR(d, a, b);
      9: return AND(d, a, b);   10: return ADDI(d, a, simm()); 11: return SLTI(d, a, simm());
      12: return SLTIU(d, a, simm()); 13: return XORI(d, a, simm()); 14: return ORI(d, a, simm());
      15: return ANDI(d, a, simm()); 16: return SLLI(d, a, $urandom_range(0, 31));
      17: return SRLI(d, a, $urandom_range(0, 31));
      default: return SRAI(d, a, $urandom_range(0, 31));
    endcase
  endfunction

  task automatic build_program();
    for (int i = 0; i < IMEM_WORDS; i++) prog[i] = JAL(5'd0, 0);
    // 1. directed examples (addresses 0..32)
    emit(ADDI(5'd1, 5'd0, 5));          // 0 : x1 = 5
    emit(ADDI(5'd2, 5'd0, -7));         // 4 : x2 = -7
    emit(ADD(5'd3, 5'd1, 5'd2));        // 8 : x3 = -2
    emit(ADDI(5'd30, 5'd0, REGION));    // 12: x30 = 0x400
    emit(SW(5'd3, 5'd30, 8));           // 16: mem[0x408] = -2
    emit(LW(5'd4, 5'd30, 8));           // 20: x4 = -2
    emit(AUIPC(5'd5, 20'd0));           // 24: x5 = 24
    emit(JALR(5'd6, 5'd5, 13));         // 28: x6 = 32, PC = (24+13) & ~1 = 36
    emit(ADDI(5'd7, 5'd0, 1));          // 32: skipped
    // 2. prologue: random registers, random data region
    for (int r = 1; r < 30; r++) begin
      emit(LUI(5'(r), 20'($urandom)));
      emit(ADDI(5'(r), 5'(r), simm()));
    end
    for (int w = 0; w < 64; w++) emit(SW(5'($urandom_range(1, 29)), 5'd30, 4 * w));
    // 3. random body
    emit(ADDI(5'd28, 5'd0, 3));                    // backward loop, 3 passes
    emit(ADDI(5'd28, 5'd28, -1));
    emit(BNE(5'd28, 5'd0, -4));
    while (n < IMEM_WORDS - 8 && n < 200 + BODY_LEN) begin
      int k = $urandom_range(0, 13);
      logic [4:0] d = rdst(), a = rsrc(), b = rsrc();
      case (k)
        0, 1, 2, 3: emit(rand_alu());
        4: case ($urandom_range(0, 4))           // loads inside the region
             0: emit(LB(d, 5'd30, $urandom_range(0, 255)));
             1: emit(LBU(d, 5'd30, $urandom_range(0, 255)));
             2: emit(LH(d, 5'd30, 2 * $urandom_range(0, 127)));
             3: emit(LHU(d, 5'd30, 2 * $urandom_range(0, 127)));
             default: emit(LW(d, 5'd30, 4 * $urandom_range(0, 63)));
           endcase
        5: case ($urandom_range(0, 2))           // stores inside the region
             0: emit(SB(a, 5'd30, $urandom_range(0, 255)));
             1: emit(SH(a, 5'd30, 2 * $urandom_range(0, 127)));
             default: emit(SW(a, 5'd30, 4 * $urandom_range(0, 63)));
           endcase
        6, 7: begin                              // forward branch over one ALU op
          case ($urandom_range(0, 5))
            0: emit(BEQ(a, ($urandom_range(0, 2) == 0) ? a : b, 8));
            1: emit(BNE(a, b, 8));
            2: emit(BLT(a, b, 8));
            3: emit(BGE(a, b, 8));
            4: emit(BLTU(a, b, 8));
            default: emit(BGEU(a, b, 8));
          endcase
          emit(rand_alu());
        end
        8: begin emit(JAL(d, 8)); emit(rand_alu()); end
        9: begin                                 // jalr to the next instruction, odd offset
          emit(AUIPC(5'd29, 20'd0));
          emit(JALR(d, 5'd29, 9));
        end
        10: emit(LUI(d, 20'($urandom)));
        11: emit(AUIPC(d, 20'($urandom)));
        12: case ($urandom_range(0, 2))
              0: emit(FENCE);
              1: emit(ECALL);
              default: emit(EBREAK);
            endcase
        default: emit(rand_alu());
      endcase
    end
    // 4. end
    end_pc = 4 * n;
    emit(JAL(5'd0, 0));
  endtask

  // ------------------------------------------------------------------
  // instruction-set model
  // ------------------------------------------------------------------
  logic [31:0] x [32];
  logic [7:0]  dm [4096];
  logic [31:0] m_pc;

  // what the model expects the processor to do this cycle
  typedef struct {
    logic        rf_we;
    logic [4:0]  rd;
    logic [31:0] rf_data;
    logic        st;
    logic [31:0] st_addr;
    logic [31:0] st_data;
    int          st_size;
    logic [31:0] next_pc;
  } step_t;

  // mechanism and instruction counters
  int n_taken = 0, n_not_taken = 0, n_jal = 0, n_jalr_odd = 0, n_x0_write = 0;
  int n_load_neg = 0, n_load_zext = 0, n_partial_store = 0, n_backward = 0;
  int n_loads = 0, n_stores = 0, n_nop_sys = 0;
  int seen [string];

  function automatic logic [31:0] ld(logic [31:0] a, int size, bit uns);
    int i = int'(a % 4096);
    logic [31:0] v;
    case (size)
      1: v = uns ? {24'd0, dm[i]} : {{24{dm[i][7]}}, dm[i]};
      2: v = uns ? {16'd0, dm[i+1], dm[i]} : {{16{dm[i+1][7]}}, dm[i+1], dm[i]};
      default: v = {dm[i+3], dm[i+2], dm[i+1], dm[i]};
    endcase
    return v;
  endfunction

  function automatic step_t model_step(logic [31:0] ins);
    step_t s;
    logic [6:0]  opc = ins[6:0];
    logic [2:0]  f3  = ins[14:12];
    logic [4:0]  rd  = ins[11:7];
    logic [31:0] a   = x[ins[19:15]];
    logic [31:0] b   = x[ins[24:20]];
    logic [31:0] ii  = {{20{ins[31]}}, ins[31:20]};
    logic [31:0] is  = {{20{ins[31]}}, ins[31:25], ins[11:7]};
    logic [31:0] ib  = {{20{ins[31]}}, ins[7], ins[30:25], ins[11:8], 1'b0};
    logic [31:0] iu  = {ins[31:12], 12'd0};
    logic [31:0] ij  = {{12{ins[31]}}, ins[19:12], ins[20], ins[30:21], 1'b0};
    logic [31:0] r;
    bit          t;
    s = '{rf_we: 0, rd: rd, rf_data: 0, st: 0, st_addr: 0, st_data: 0, st_size: 0, next_pc: m_pc + 4};
    case (opc)
      7'b0110111: begin s.rf_we = 1; s.rf_data = iu; seen["lui"]++; end
      7'b0010111: begin s.rf_we = 1; s.rf_data = m_pc + iu; seen["auipc"]++; end
      7'b1101111: begin s.rf_we = 1; s.rf_data = m_pc + 4; s.next_pc = m_pc + ij; seen["jal"]++; n_jal++; end
      7'b1100111: begin
        s.rf_we = 1; s.rf_data = m_pc + 4; r = a + ii; s.next_pc = {r[31:1], 1'b0};
        if (r[0]) n_jalr_odd++;
        seen["jalr"]++;
      end
      7'b1100011: begin
        case (f3)
          0: begin t = (a == b); seen["beq"]++; end
          1: begin t = (a != b); seen["bne"]++; end
          4: begin t = ($signed(a) < $signed(b)); seen["blt"]++; end
          5: begin t = ($signed(a) >= $signed(b)); seen["bge"]++; end
          6: begin t = (a < b); seen["bltu"]++; end
          default: begin t = (a >= b); seen["bgeu"]++; end
        endcase
        if (t) begin
          s.next_pc = m_pc + ib; n_taken++;
          if (ib[31]) n_backward++;
        end else n_not_taken++;
      end
      7'b0000011: begin
        r = a + ii; s.rf_we = 1; n_loads++;
        case (f3)
          0: begin s.rf_data = ld(r, 1, 0); seen["lb"]++; end
          1: begin s.rf_data = ld(r, 2, 0); seen["lh"]++; end
          4: begin s.rf_data = ld(r, 1, 1); seen["lbu"]++; end
          5: begin s.rf_data = ld(r, 2, 1); seen["lhu"]++; end
          default: begin s.rf_data = ld(r, 4, 0); seen["lw"]++; end
        endcase
        if ((f3 == 0 || f3 == 1) && s.rf_data[31]) n_load_neg++;
        if ((f3 == 4 && ld(r, 1, 0) != s.rf_data) || (f3 == 5 && ld(r, 2, 0) != s.rf_data)) n_load_zext++;
      end
      7'b0100011: begin
        s.st = 1; s.st_addr = a + is; s.st_data = b; n_stores++;
        s.st_size = (f3 == 0) ? 1 : (f3 == 1) ? 2 : 4;
        if (s.st_size < 4) n_partial_store++;
        seen[(f3 == 0) ? "sb" : (f3 == 1) ? "sh" : "sw"]++;
      end
      7'b0010011: begin
        s.rf_we = 1;
        case (f3)
          0: begin s.rf_data = a + ii; seen["addi"]++; end
          2: begin s.rf_data = ($signed(a) < $signed(ii)) ? 1 : 0; seen["slti"]++; end
          3: begin s.rf_data = (a < ii) ? 1 : 0; seen["sltiu"]++; end
          4: begin s.rf_data = a ^ ii; seen["xori"]++; end
          6: begin s.rf_data = a | ii; seen["ori"]++; end
          7: begin s.rf_data = a & ii; seen["andi"]++; end
          1: begin s.rf_data = a << ins[24:20]; seen["slli"]++; end
          default:
            if (ins[30]) begin s.rf_data = 32'($signed(a) >>> ins[24:20]); seen["srai"]++; end
            else         begin s.rf_data = a >> ins[24:20]; seen["srli"]++; end
        endcase
      end
      7'b0110011: begin
        s.rf_we = 1;
        case ({ins[30], f3})
          4'b0000: begin s.rf_data = a + b; seen["add"]++; end
          4'b1000: begin s.rf_data = a - b; seen["sub"]++; end
          4'b0001: begin s.rf_data = a << b[4:0]; seen["sll"]++; end
          4'b0010: begin s.rf_data = ($signed(a) < $signed(b)) ? 1 : 0; seen["slt"]++; end
          4'b0011: begin s.rf_data = (a < b) ? 1 : 0; seen["sltu"]++; end
          4'b0100: begin s.rf_data = a ^ b; seen["xor"]++; end
          4'b0101: begin s.rf_data = a >> b[4:0]; seen["srl"]++; end
          4'b1101: begin s.rf_data = 32'($signed(a) >>> b[4:0]); seen["sra"]++; end
          4'b0110: begin s.rf_data = a | b; seen["or"]++; end
          default: begin s.rf_data = a & b; seen["and"]++; end
        endcase
      end
      default: begin n_nop_sys++; seen["fence/ecall/ebreak"]++; end
    endcase
    return s;
  endfunction

  task automatic model_commit(step_t s);
    if (s.rf_we && s.rd != 0) x[s.rd] = s.rf_data;
    if (s.rf_we && s.rd == 0) n_x0_write++;
    if (s.st)
      for (int i = 0; i < s.st_size; i++) dm[int'((s.st_addr + 32'(i)) % 4096)] = s.st_data[8*i +: 8];
    m_pc = s.next_pc;
  endtask

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d pc=%h: %s", cycles, m_pc, what);
    end
  endtask

  // hand-computed results of the directed part: pc -> expected write
  function automatic bit directed(logic [31:0] pc, output logic [4:0] rd, output logic [31:0] v);
    case (pc)
      0:  begin rd = 1; v = 32'd5;         return 1; end
      4:  begin rd = 2; v = 32'hffff_fff9; return 1; end
      8:  begin rd = 3; v = 32'hffff_fffe; return 1; end
      20: begin rd = 4; v = 32'hffff_fffe; return 1; end
      24: begin rd = 5; v = 32'd24;        return 1; end
      28: begin rd = 6; v = 32'd32;        return 1; end
      default: begin rd = 0; v = 0;        return 0; end
    endcase
  endfunction

  initial begin
    step_t       s;
    logic [4:0]  drd;
    logic [31:0] dv;
    automatic int retired = 0, self_loop = 0;
    automatic bit pc36 = 0, mismatch;
    string       names [$];

    build_program();
    foreach (x[i]) x[i] = 0;
    m_pc = 0;

    // load the program through the load port while in reset
    rst_n = 0;
    for (int i = 0; i < IMEM_WORDS; i++) begin
      @(negedge clk);
      imem_load_we = 1; imem_load_addr = 10'(i); imem_load_data = prog[i];
    end
    @(negedge clk);
    imem_load_we = 0;
    @(posedge clk);
    #1 rst_n = 1;
    chk(pc_o == 32'd0, "PC after reset");

    while (self_loop < 3) begin
      @(negedge clk);
      if (cycles >= MAX_CYCLES - 1) break;
      s = model_step(prog[int'(m_pc >> 2)]);
      mismatch = 0;
      chk(pc_o == m_pc, $sformatf("pc %h", pc_o));
      chk(instr_o == prog[int'(m_pc >> 2)], "instruction");
      chk(rf_we_o == s.rf_we, "register write enable");
      if (s.rf_we && s.rd != 0) begin
        chk(rf_wr_idx_o == s.rd, $sformatf("rd %0d exp %0d", rf_wr_idx_o, s.rd));
        chk(rf_wr_data_o == s.rf_data, $sformatf("rd data %h exp %h", rf_wr_data_o, s.rf_data));
      end
      chk(dmem_we_o == s.st, "memory write enable");
      if (s.st) begin
        chk(dmem_addr_o == s.st_addr, $sformatf("store addr %h exp %h", dmem_addr_o, s.st_addr));
        chk(s.st_size == 4 ? dmem_wdata_o == s.st_data :
            s.st_size == 2 ? dmem_wdata_o[15:0] == s.st_data[15:0] :
                             dmem_wdata_o[7:0] == s.st_data[7:0], "store data");
      end
      if (directed(m_pc, drd, dv)) begin
        chk(rf_we_o && rf_wr_idx_o == drd && rf_wr_data_o == dv,
            $sformatf("directed example at pc %0d: x%0d=%h exp x%0d=%h", m_pc, rf_wr_idx_o, rf_wr_data_o, drd, dv));
      end
      if (m_pc == 32'd16) chk(dmem_we_o && dmem_addr_o == 32'h408 && dmem_wdata_o == 32'hffff_fffe, "directed sw");
      if (m_pc == 32'd28) chk(s.next_pc == 32'd36, "directed jalr target");
      if (m_pc == 32'd36) pc36 = 1;
      if (m_pc == 32'(end_pc)) self_loop++;
      else retired++;
      model_commit(s);
      @(posedge clk);
      cycles++;
    end

    // one instruction per cycle: every cycle from reset release to the
    // self-loop retired one program instruction
    chk(pc36, "jalr landed on pc 36");
    chk(retired + self_loop == cycles, $sformatf("cycles %0d vs instructions %0d", cycles, retired + self_loop));

    // mechanism coverage
    $display("instructions %0d in %0d cycles", retired, cycles);
    $display("branches taken %0d (backward %0d), not taken %0d; jal %0d; jalr with bit 0 cleared %0d",
             n_taken, n_backward, n_not_taken, n_jal, n_jalr_odd);
    $display("loads %0d (negative sign-extended %0d, zero-extended %0d); stores %0d (partial %0d)",
             n_loads, n_load_neg, n_load_zext, n_stores, n_partial_store);
    $display("writes to x0 discarded %0d; fence/ecall/ebreak %0d", n_x0_write, n_nop_sys);
    chk(n_taken > 0,         "a taken branch");
    chk(n_not_taken > 0,     "a branch not taken");
    chk(n_backward > 0,      "a backward taken branch");
    chk(n_jal > 0,           "a jal");
    chk(n_jalr_odd > 0,      "a jalr with bit 0 cleared");
    chk(n_x0_write > 0,      "a write to x0");
    chk(n_load_neg > 0,      "a sign-extended negative load");
    chk(n_load_zext > 0,     "a zero-extended load");
    chk(n_partial_store > 0, "a byte or half store");
    chk(n_nop_sys > 0,       "fence/ecall/ebreak");
    names = '{"lui", "auipc", "jal", "jalr", "beq", "bne", "blt", "bge", "bltu", "bgeu",
              "lb", "lh", "lw", "lbu", "lhu", "sb", "sh", "sw",
              "addi", "slti", "sltiu", "xori", "ori", "andi", "slli", "srli", "srai",
              "add", "sub", "sll", "slt", "sltu", "xor", "srl", "sra", "or", "and"};
    foreach (names[i]) chk(seen.exists(names[i]) && seen[names[i]] > 0, {"instruction executed: ", names[i]});

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
