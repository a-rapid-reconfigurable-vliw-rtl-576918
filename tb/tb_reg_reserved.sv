// tb_reg_reserved: random sequence of loads from memory, loads from the ALU
// registers, zeros, ones and idle cycles, compared with a model value after
// every clock edge; also checks the all-X reset value.
module tb_reg_reserved;
  logic clk = 0, rst_n = 0;
  logic ld_mem, ld_alu, zeros, ones;
  logic [31:0] mem_data, alu_data, q, m;
  int checks = 0, failures = 0;

  reg_reserved dut (.clk, .rst_n, .ld_mem, .mem_data, .ld_alu, .alu_data,
                    .zeros, .ones, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {ld_mem, ld_alu, zeros, ones} = '0;
    mem_data = '0;
    alu_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (q !== 32'h5555_5555) begin
      failures++;
      $display("FAIL reset q=%h", q);
    end
    m = q;
    for (int it = 0; it < 2000; it++) begin
      int k;
      k = $urandom_range(4);
      {ld_mem, ld_alu, zeros, ones} = '0;
      mem_data = $urandom;
      alu_data = $urandom;
      case (k)
        0: begin ld_mem = 1; m = mem_data; end
        1: begin ld_alu = 1; m = alu_data; end
        2: begin zeros = 1;  m = '0; end
        3: begin ones = 1;   m = '1; end
        default: ;
      endcase
      @(negedge clk);
      checks++;
      if (q !== m) begin
        failures++;
        $display("FAIL op=%0d q=%h exp=%h", k, q, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
