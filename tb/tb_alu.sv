// tb_alu: self-checking test of the ALU.
// Random and corner operands for every operation; expected results are
// computed here from the RV32I definitions (shifts as repeated single-bit
// shifts, comparisons through 64-bit integers).
module tb_alu;
  import rv32i_pkg::*;
  logic [31:0] op1, op2, res;
  alu_op_t     ctrl;
  int checks = 0, failures = 0;

  alu dut (.op1, .op2, .ctrl, .res);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(alu_op_t c, logic [31:0] a, logic [31:0] b);
    logic [31:0] r;
    longint sa, sb;
    sa = longint'($signed(a)); sb = longint'($signed(b));
    case (c)
      ALU_ADD:    return 32'(longint'(a) + longint'(b));
      ALU_SUB:    return 32'(longint'(a) - longint'(b));
      ALU_SLL:    begin r = a; for (int i = 0; i < b[4:0]; i++) r = {r[30:0], 1'b0}; return r; end
      ALU_SRL:    begin r = a; for (int i = 0; i < b[4:0]; i++) r = {1'b0, r[31:1]}; return r; end
      ALU_SRA:    begin r = a; for (int i = 0; i < b[4:0]; i++) r = {r[31], r[31:1]}; return r; end
      ALU_SLT:    return (sa < sb) ? 32'd1 : 32'd0;
      ALU_SLTU:   return (longint'(a) < longint'(b)) ? 32'd1 : 32'd0;
      ALU_XOR:    begin for (int i = 0; i < 32; i++) r[i] = a[i] != b[i]; return r; end
      ALU_OR:     begin for (int i = 0; i < 32; i++) r[i] = a[i] || b[i]; return r; end
      ALU_AND:    begin for (int i = 0; i < 32; i++) r[i] = a[i] && b[i]; return r; end
      ALU_PASS_B: return b;
      ALU_ADD_J:  begin r = 32'(longint'(a) + longint'(b)); r[0] = 1'b0; return r; end
      default:    return 'x;
    endcase
  endfunction

  task automatic check(alu_op_t c, logic [31:0] a, logic [31:0] b);
    logic [31:0] exp;
    ctrl = c; op1 = a; op2 = b;
    #1;
    exp = model(c, a, b);
    checks++;
    if (res !== exp) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h res=%h exp=%h", c, a, b, res, exp);
    end
  endtask

  localparam logic [31:0] CORNER [6] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff, 32'h1f};

  initial begin
    for (int c = 0; c <= 11; c++) begin
      foreach (CORNER[i]) foreach (CORNER[j]) check(alu_op_t'(c), CORNER[i], CORNER[j]);
      repeat (300) check(alu_op_t'(c), $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
