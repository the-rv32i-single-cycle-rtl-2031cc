// branch_unit: branch condition evaluation.
//
// Compares the two register values a (rs1) and b (rs2) with one 33-bit
// subtractor, as a separate comparator next to the ALU, and reports whether
// the condition cond holds (taken):
//   eq  : the difference is zero
//   ltu : the borrow of a - b (bit 32 of the zero-extended difference)
//   lt  : the sign bit of a when the signs differ, else the borrow
// beq/bne use eq, blt/bge lt, bltu/bgeu ltu; cond is the branch funct3.
// The branch target itself is computed by the ALU. Combinational.
module branch_unit
  import rv32i_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  br_cond_t    cond,
  output logic        taken
);
  logic [32:0] diff_u;
  logic eq, lt, ltu;

  assign diff_u = {1'b0, a} - {1'b0, b};
  assign eq  = (diff_u == 33'd0);
  assign ltu = diff_u[32];
  assign lt  = (a[31] != b[31]) ? a[31] : ltu;

  always_comb begin
    unique case (cond)
      BR_EQ:   taken = eq;
      BR_NE:   taken = !eq;
      BR_LT:   taken = lt;
      BR_GE:   taken = !lt;
      BR_LTU:  taken = ltu;
      BR_GEU:  taken = !ltu;
      default: taken = 1'b0;
    endcase
  end
endmodule
