// data_mem: the data memory used by loads and stores.
//
// WORDS 32-bit words, byte addressed through addr (the ALU result); address
// bits above the array wrap. One address input, one write-data input
// (data_in, the rs2 value) and one read-data output (data_out).
// mode selects the access: byte, half or word, and for loads sign or zero
// extension (MEM_B/MEM_H sign-extend, MEM_BU/MEM_HU zero-extend).
// A store writes only the addressed byte lanes on the rising clock edge when
// wr_en is high; a load reads combinationally in the same cycle. Accesses are
// expected to be naturally aligned: a half uses addr[1], a byte addr[1:0],
// and misaligned parts of the address are ignored; an assertion flags a
// misaligned store in simulation. The size, the timing of read and write,
// and the alignment rule are this design's choice.
module data_mem
  import rv32i_pkg::*;
#(
  parameter int WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [31:0] data_in,
  input  mem_mode_t   mode,
  input  logic        wr_en,
  output logic [31:0] data_out
);
  localparam int AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] widx;
  logic [1:0]    boff;
  logic [31:0]   word, wdata;
  logic [3:0]    be;

  assign widx = AW'(addr >> 2);
  assign boff = addr[1:0];
  assign word = mem[widx];

  // store: replicate the low byte/half over the lanes, enable the addressed ones
  always_comb begin
    unique case (mode)
      MEM_B, MEM_BU: begin
        wdata = {4{data_in[7:0]}};
        be    = 4'b0001 << boff;
      end
      MEM_H, MEM_HU: begin
        wdata = {2{data_in[15:0]}};
        be    = boff[1] ? 4'b1100 : 4'b0011;
      end
      default: begin
        wdata = data_in;
        be    = 4'b1111;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int i = 0; i < 4; i++)
        if (be[i]) mem[widx][8*i +: 8] <= wdata[8*i +: 8];
    end
  end

  // stores must be naturally aligned
  a_store_aligned: assert property (@(posedge clk)
    wr_en |-> ((mode inside {MEM_H, MEM_HU}) ? !addr[0] :
               (mode == MEM_W) ? (addr[1:0] == 2'b00) : 1'b1))
    else $error("misaligned store: addr=%h mode=%0d", addr, mode);

  // load: select the addressed lane and extend
  logic [7:0]  byte_v;
  logic [15:0] half_v;
  assign byte_v = word[8*boff +: 8];
  assign half_v = boff[1] ? word[31:16] : word[15:0];

  always_comb begin
    unique case (mode)
      MEM_B:   data_out = {{24{byte_v[7]}}, byte_v};
      MEM_BU:  data_out = {24'd0, byte_v};
      MEM_H:   data_out = {{16{half_v[15]}}, half_v};
      MEM_HU:  data_out = {16'd0, half_v};
      default: data_out = word;
    endcase
  end
endmodule
