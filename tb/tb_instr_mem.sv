// tb_instr_mem: self-checking test of the instruction memory.
// Part 1 loads tb/tb_instr_mem.hex through INIT_FILE into a 16-word memory
// and compares every word read with the file's words, which are repeated
// below. Part 2 fills a second, default-size memory through its load port
// and reads it back at every word address, ignoring addr[1:0] and wrapping
// past the end; a load-port write must not show before the clock edge.
module tb_instr_mem;
  logic        clk = 0;
  logic [31:0] addr_a, instr_a, addr_b, instr_b;
  logic        load_we = 0;
  logic [9:0]  load_addr = 0;
  logic [31:0] load_data = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [31:0] FILE_WORDS [16] = '{
    32'h52e6b438, 32'hf2a74de4, 32'h269e0d37, 32'h6513270e, 32'ha6a3a450, 32'h0c5c7fd0, 32'h128b2f33, 32'hd23f0824, 32'h892f902b, 32'h1818e811, 32'h5d9dc9f8, 32'h9531985d, 32'h0ed90475, 32'he8e25d94, 32'h81e74ef5, 32'h36f675cc};

  instr_mem #(.WORDS(16), .INIT_FILE("tb/tb_instr_mem.hex")) dut_a (
    .clk, .addr(addr_a), .instr(instr_a), .load_we(1'b0), .load_addr(4'd0), .load_data(32'd0));
  instr_mem dut_b (
    .clk, .addr(addr_b), .instr(instr_b), .load_we, .load_addr, .load_data);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] pat [1024];
    #1;
    for (int i = 0; i < 16; i++) begin
      addr_a = 32'(4 * i) | 32'($urandom_range(0, 3));
      #1;
      checks++;
      if (instr_a !== FILE_WORDS[i]) begin
        failures++; $display("FAIL file word %0d: %h exp %h", i, instr_a, FILE_WORDS[i]);
      end
    end
    for (int i = 0; i < 1024; i++) begin
      pat[i] = $urandom;
      @(negedge clk);
      load_we = 1; load_addr = 10'(i); load_data = pat[i];
      addr_b = 32'(4 * i);
      @(posedge clk); #1;
      checks++;
      if (instr_b !== pat[i]) begin failures++; $display("FAIL load word %0d", i); end
    end
    load_we = 0;
    // before the edge: a pending write does not show
    @(negedge clk);
    load_we = 1; load_addr = 10'd5; load_data = ~pat[5]; addr_b = 32'd20;
    #1;
    checks++;
    if (instr_b !== pat[5]) begin failures++; $display("FAIL write visible before the edge"); end
    @(posedge clk); #1;
    load_we = 0;
    pat[5] = ~pat[5];
    for (int i = 0; i < 2048; i++) begin
      addr_b = 32'(4 * i) | 32'($urandom_range(0, 3));
      #1;
      checks++;
      if (instr_b !== pat[i % 1024]) begin
        failures++; $display("FAIL word %0d: %h exp %h", i, instr_b, pat[i % 1024]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
