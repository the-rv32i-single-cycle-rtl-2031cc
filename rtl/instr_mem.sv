// instr_mem: instruction memory, read-only for the processor.
//
// WORDS 32-bit words, addressed by the byte address on addr (the PC); the
// two low address bits are ignored and address bits above the array wrap.
// The read is combinational: the instruction of the current PC is available
// in the same cycle, as a single-cycle processor needs.
// The processor never writes this memory. Its contents come from INIT_FILE
// (hex words, $readmemh) when one is given, and/or through the load port
// (load_we, load_addr as a word index, load_data), written on the rising
// edge of clk, which a host uses to place a program before it releases the
// processor from reset. The size, the initial-file parameter and the load
// port are this design's choice.
module instr_mem #(
  parameter int    WORDS     = 1024,
  parameter string INIT_FILE = "",
  localparam int   AW        = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic          clk,
  input  logic [31:0]   addr,
  output logic [31:0]   instr,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [31:0]   load_data
);
  logic [31:0] mem [WORDS];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  logic [AW-1:0] widx;
  assign widx  = AW'(addr >> 2);
  assign instr = mem[widx];
endmodule
