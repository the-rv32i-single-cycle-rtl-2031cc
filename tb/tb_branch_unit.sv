// tb_branch_unit: self-checking test of the branch comparator.
// Every condition on corner and random operand pairs (including equal
// pairs); expected outcomes come from 64-bit signed/unsigned comparisons.
module tb_branch_unit;
  import rv32i_pkg::*;
  logic [31:0] a, b;
  br_cond_t    cond;
  logic        taken;
  int checks = 0, failures = 0;

  branch_unit dut (.a, .b, .cond, .taken);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(br_cond_t c, logic [31:0] x, logic [31:0] y);
    logic exp;
    longint sx, sy, ux, uy;
    sx = longint'($signed(x)); sy = longint'($signed(y));
    ux = longint'(x);          uy = longint'(y);
    case (c)
      BR_EQ:  exp = (ux == uy);
      BR_NE:  exp = (ux != uy);
      BR_LT:  exp = (sx <  sy);
      BR_GE:  exp = (sx >= sy);
      BR_LTU: exp = (ux <  uy);
      BR_GEU: exp = (ux >= uy);
      default: exp = 1'b0;
    endcase
    cond = c; a = x; b = y;
    #1;
    checks++;
    if (taken !== exp) begin
      failures++;
      $display("FAIL cond=%0d a=%h b=%h taken=%b exp=%b", c, x, y, taken, exp);
    end
  endtask

  localparam logic [31:0] CORNER [5] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff};
  localparam br_cond_t CONDS [6] = '{BR_EQ, BR_NE, BR_LT, BR_GE, BR_LTU, BR_GEU};

  initial begin
    logic [31:0] r;
    foreach (CONDS[k]) begin
      foreach (CORNER[i]) foreach (CORNER[j]) check(CONDS[k], CORNER[i], CORNER[j]);
      repeat (300) begin
        r = $urandom;
        check(CONDS[k], r, ($urandom_range(0, 3) == 0) ? r : $urandom);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
