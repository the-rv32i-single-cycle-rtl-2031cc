// tb_mux: self-checking test of the N-input selector, at N = 2 and N = 3
// (the sizes used in the processor) with random data on every input.
module tb_mux;
  logic [1:0][31:0] in2;
  logic [2:0][31:0] in3;
  logic             sel2;
  logic [1:0]       sel3;
  logic [31:0]      out2, out3;
  int checks = 0, failures = 0;

  mux #(.N(2), .W(32)) dut2 (.in(in2), .sel(sel2), .out(out2));
  mux #(.N(3), .W(32)) dut3 (.in(in3), .sel(sel3), .out(out3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) begin
      in2 = {$urandom, $urandom};
      in3 = {$urandom, $urandom, $urandom};
      sel2 = 1'($urandom);
      sel3 = 2'($urandom_range(0, 3));
      #1;
      checks += 2;
      if (out2 !== (sel2 ? in2[1] : in2[0])) begin
        failures++; $display("FAIL mux2 sel=%0d out=%h", sel2, out2);
      end
      if (out3 !== ((sel3 == 2'd1) ? in3[1] : (sel3 == 2'd2) ? in3[2] : in3[0])) begin
        failures++; $display("FAIL mux3 sel=%0d out=%h", sel3, out3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
