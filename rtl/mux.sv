// mux: N-input selector of W-bit words.
//
// out = in[sel]. Used for the ALU operand selectors (two inputs) and the
// write-back selector (three inputs: PC+increment, ALU result, memory data).
// A select value of N or more returns input 0. Combinational.
module mux #(
  parameter int N = 2,
  parameter int W = 32,
  localparam int SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][W-1:0] in,
  input  logic [SW-1:0]       sel,
  output logic [W-1:0]        out
);
  always_comb begin
    out = in[0];
    for (int i = 1; i < N; i++)
      if (int'(sel) == i) out = in[i];
  end
endmodule
