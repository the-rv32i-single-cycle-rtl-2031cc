// next_pc: next-address logic of the fetch stage.
//
// The PC increment is chosen by a two-way selector between the constants 4
// and 2 (inc_sel = 0 selects 4, the RV32I case; 2 is the step of a 16-bit
// encoding) and added to the PC. The result, pc_plus, goes both to the PC
// selector and to the write-back selector (return address of jal/jalr).
// The PC selector takes the ALU result, which carries the branch or jump
// target, when (branch AND branch_taken) OR jump; otherwise pc_plus.
// The structure (4/2 selector, adder, PC selector, AND/OR select) follows the
// processor's datapath; the signal names are this design's.
// Purely combinational.
module next_pc (
  input  logic [31:0] pc,
  input  logic        inc_sel,
  input  logic [31:0] alu_res,
  input  logic        branch,
  input  logic        branch_taken,
  input  logic        jump,
  output logic [31:0] pc_plus,
  output logic [31:0] pc_next
);
  logic [31:0] inc;
  logic        take_target;

  always_comb begin
    inc         = inc_sel ? 32'd2 : 32'd4;
    pc_plus     = pc + inc;
    take_target = (branch & branch_taken) | jump;
    pc_next     = take_target ? alu_res : pc_plus;
  end
endmodule
