// tb_pc_reg: self-checking test of the program counter register: reset
// value, one load per rising edge, no change between edges.
module tb_pc_reg;
  logic        clk = 0, rst_n;
  logic [31:0] pc_next, pc;
  int checks = 0, failures = 0;
  int cycles = 0;

  pc_reg #(.RESET_PC(32'h0000_0100)) dut (.clk, .rst_n, .pc_next, .pc);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] exp, string what);
    checks++;
    if (pc !== exp) begin failures++; $display("FAIL %s pc=%h exp=%h", what, pc, exp); end
  endtask

  initial begin
    logic [31:0] v, prev;
    rst_n = 0; pc_next = 32'hdead_beef;
    @(posedge clk); #1;
    chk(32'h0000_0100, "reset");
    rst_n = 1;
    repeat (100) begin
      v = $urandom;
      prev = pc;
      pc_next = v;
      #3 chk(prev, "hold");      // value must not change before the edge
      @(posedge clk); #1;
      chk(v, "load");
    end
    rst_n = 0; @(posedge clk); #1;
    chk(32'h0000_0100, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
