// reg_file: the 32 x 32-bit integer register file.
//
// Two read ports (r1_idx -> reg1, r2_idx -> reg2) that read combinationally,
// and one write port (wr_idx, data_in, wr_en) written on the rising clock
// edge. Register x0 always reads as zero and ignores writes. A register
// written in a cycle is read with its old value in that same cycle. The
// registers are not reset. All of this follows the processor description;
// only the same-cycle read behaviour is stated here as a consequence.
module reg_file #(
  parameter int NREGS = 32
) (
  input  logic                     clk,
  input  logic [$clog2(NREGS)-1:0] r1_idx,
  input  logic [$clog2(NREGS)-1:0] r2_idx,
  output logic [31:0]              reg1,
  output logic [31:0]              reg2,
  input  logic                     wr_en,
  input  logic [$clog2(NREGS)-1:0] wr_idx,
  input  logic [31:0]              data_in
);
  logic [31:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (wr_en && wr_idx != '0) regs[wr_idx] <= data_in;
  end

  assign reg1 = (r1_idx == '0) ? 32'd0 : regs[r1_idx];
  assign reg2 = (r2_idx == '0) ? 32'd0 : regs[r2_idx];
endmodule
