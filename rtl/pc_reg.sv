// pc_reg: the program counter of the single-cycle RV32I processor.
//
// A 32-bit register holding the address of the instruction being executed.
// It loads pc_next on every rising clock edge, so each cycle executes one new
// instruction. An active-low synchronous reset puts it at RESET_PC; the
// reset and its value are this design's choice.
module pc_reg #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] pc_next,
  output logic [31:0] pc
);
  always_ff @(posedge clk) begin
    if (!rst_n) pc <= RESET_PC;
    else        pc <= pc_next;
  end
endmodule
