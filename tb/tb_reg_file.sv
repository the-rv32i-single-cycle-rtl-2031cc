// tb_reg_file: self-checking test of the register file against an array
// model: random writes and reads on both ports, x0 stays zero, a write is
// visible only after the rising edge, and reads are combinational.
module tb_reg_file;
  logic        clk = 0;
  logic [4:0]  r1_idx, r2_idx, wr_idx;
  logic [31:0] reg1, reg2, data_in;
  logic        wr_en;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  int cycles = 0;

  reg_file dut (.clk, .r1_idx, .r2_idx, .reg1, .reg2, .wr_en, .wr_idx, .data_in);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_chk;
    #1;
    checks += 2;
    if (reg1 !== model[r1_idx]) begin failures++; $display("FAIL r1 x%0d=%h exp %h", r1_idx, reg1, model[r1_idx]); end
    if (reg2 !== model[r2_idx]) begin failures++; $display("FAIL r2 x%0d=%h exp %h", r2_idx, reg2, model[r2_idx]); end
  endtask

  initial begin
    // fill every register (x0 write must be ignored)
    wr_en = 1;
    for (int i = 0; i < 32; i++) begin
      wr_idx = 5'(i); data_in = $urandom;
      @(negedge clk);
      model[i] = (i == 0) ? 32'd0 : data_in;
    end
    wr_en = 0;
    for (int i = 0; i < 32; i++) begin r1_idx = 5'(i); r2_idx = 5'(31 - i); read_chk(); end
    // random traffic; read the register being written before the edge
    repeat (2000) begin
      @(negedge clk);
      wr_en = 1'($urandom); wr_idx = 5'($urandom); data_in = $urandom;
      r1_idx = wr_idx; r2_idx = 5'($urandom);
      read_chk();                       // old value before the edge
      @(posedge clk);
      if (wr_en && wr_idx != 0) model[wr_idx] = data_in;
      read_chk();                       // new value after the edge
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
