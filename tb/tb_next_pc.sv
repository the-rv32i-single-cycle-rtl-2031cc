// tb_next_pc: self-checking test of the next-PC logic: increment 4 or 2,
// and target selection for (branch AND taken) OR jump, over all eight
// combinations of the three select inputs with random PCs and targets.
module tb_next_pc;
  logic [31:0] pc, alu_res, pc_plus, pc_next;
  logic        inc_sel, branch, branch_taken, jump;
  int checks = 0, failures = 0;

  next_pc dut (.pc, .inc_sel, .alu_res, .branch, .branch_taken, .jump, .pc_plus, .pc_next);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_plus, exp_next;
    repeat (50) begin
      for (int s = 0; s < 16; s++) begin
        pc = $urandom; alu_res = $urandom;
        if (s == 0) pc = 32'hffff_fffc;
        {inc_sel, branch, branch_taken, jump} = 4'(s);
        #1;
        exp_plus = pc + (inc_sel ? 32'd2 : 32'd4);
        exp_next = ((branch && branch_taken) || jump) ? alu_res : exp_plus;
        checks += 2;
        if (pc_plus !== exp_plus) begin failures++; $display("FAIL pc_plus %h exp %h", pc_plus, exp_plus); end
        if (pc_next !== exp_next) begin failures++; $display("FAIL pc_next %h exp %h (s=%0d)", pc_next, exp_next, s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
