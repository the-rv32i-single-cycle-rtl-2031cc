// tb_data_mem: self-checking test of the data memory against a byte-array
// model: random byte, half and word stores at aligned addresses, loads of
// every size with sign and zero extension, writes only on wr_en and only on
// the rising edge. The memory is made small to cover it quickly.
module tb_data_mem;
  import rv32i_pkg::*;
  localparam int WORDS = 16;
  logic        clk = 0;
  logic [31:0] addr, data_in, data_out;
  mem_mode_t   mode;
  logic        wr_en;
  logic [7:0]  bytes [4*WORDS];
  int checks = 0, failures = 0;
  int cycles = 0;

  data_mem #(.WORDS(WORDS)) dut (.clk, .addr, .data_in, .mode, .wr_en, .data_out);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam mem_mode_t MODES [5] = '{MEM_B, MEM_H, MEM_W, MEM_BU, MEM_HU};

  function automatic logic [31:0] aligned(mem_mode_t m, logic [31:0] a);
    case (m)
      MEM_H, MEM_HU: return {a[31:1], 1'b0};
      MEM_W:         return {a[31:2], 2'b0};
      default:       return a;
    endcase
  endfunction

  function automatic logic [31:0] load_model(mem_mode_t m, logic [31:0] a);
    int i = int'(a % (4 * WORDS));
    case (m)
      MEM_B:  return 32'($signed(bytes[i]));
      MEM_BU: return {24'd0, bytes[i]};
      MEM_H:  return 32'($signed({bytes[i+1], bytes[i]}));
      MEM_HU: return {16'd0, bytes[i+1], bytes[i]};
      default: return {bytes[i+3], bytes[i+2], bytes[i+1], bytes[i]};
    endcase
  endfunction

  task automatic load_chk(mem_mode_t m, logic [31:0] a);
    logic [31:0] exp;
    mode = m; addr = a; wr_en = 0;
    #1;
    exp = load_model(m, a);
    checks++;
    if (data_out !== exp) begin
      failures++;
      $display("FAIL load mode=%0d addr=%h got=%h exp=%h", m, a, data_out, exp);
    end
  endtask

  initial begin
    mem_mode_t m;
    logic [31:0] a, d;
    int i;
    // initialise with word stores
    @(negedge clk);
    for (int w = 0; w < WORDS; w++) begin
      mode = MEM_W; addr = 32'(4 * w); data_in = $urandom; wr_en = 1;
      {bytes[4*w+3], bytes[4*w+2], bytes[4*w+1], bytes[4*w]} = data_in;
      @(negedge clk);
    end
    wr_en = 0;
    for (int w = 0; w < WORDS; w++) load_chk(MEM_W, 32'(4 * w));
    repeat (1500) begin
      @(negedge clk);
      m = MODES[$urandom_range(0, 4)];
      a = aligned(m, 32'($urandom_range(0, 4 * WORDS - 1)));
      d = $urandom;
      if ($urandom_range(0, 1) == 1) begin
        // store: no change before the edge, new value after
        mode = m; addr = a; data_in = d; wr_en = 1;
        #1;
        checks++;
        if (data_out !== load_model(m, a)) begin failures++; $display("FAIL early write at %h", a); end
        @(posedge clk);
        #1;
        wr_en = 0;
        i = int'(a);
        case (m)
          MEM_B, MEM_BU: bytes[i] = d[7:0];
          MEM_H, MEM_HU: {bytes[i+1], bytes[i]} = d[15:0];
          default:       {bytes[i+3], bytes[i+2], bytes[i+1], bytes[i]} = d;
        endcase
        load_chk(MEM_W, {a[31:2], 2'b00});
      end else begin
        load_chk(m, a);
      end
    end
    for (int b = 0; b < 4 * WORDS; b++) begin
      load_chk(MEM_B, 32'(b)); load_chk(MEM_BU, 32'(b));
      if (b % 2 == 0) begin load_chk(MEM_H, 32'(b)); load_chk(MEM_HU, 32'(b)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
