// tb_board_memory: the host fills memory, the co-processor side reads it back
// and overwrites part of it, the host reads the result; then the two banks
// are given to different sides at once, so each half-word must come from
// the side that owns its bank. A model array of the same size keeps the
// expected contents. Reads are checked one cycle after the address.
module tb_board_memory;
  localparam int AW = 8;
  logic clk = 0;
  logic [1:0] host_own;
  logic [AW-1:0] cp_addr, host_addr;
  logic cp_we, host_we;
  logic [31:0] cp_wdata, host_wdata, cp_rdata, host_rdata;
  logic [31:0] m [2**AW];
  int checks = 0, failures = 0;

  board_memory #(.ADDR_W(AW)) dut (.clk, .host_own, .cp_addr, .cp_we, .cp_wdata,
    .cp_rdata, .host_addr, .host_we, .host_wdata, .host_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    {cp_we, host_we} = '0;
    cp_addr = '0; host_addr = '0; cp_wdata = '0; host_wdata = '0;
    host_own = 2'b11;
    // host download
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      host_addr = AW'(a); host_we = 1; host_wdata = $urandom; m[a] = host_wdata;
    end
    @(negedge clk);
    host_we = 0;
    host_own = 2'b00;
    // co-processor reads everything, writes a quarter of it
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      cp_addr = AW'(a);
      cp_we = (a % 4 == 0);
      cp_wdata = $urandom;
      if (cp_we) m[a] = cp_wdata;
      @(posedge clk);
      @(negedge clk);
      chk(cp_rdata, m[a], "cp read");
      cp_we = 0;
    end
    // host upload
    host_own = 2'b11;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      host_addr = AW'(a);
      @(posedge clk);
      @(negedge clk);
      chk(host_rdata, m[a], "host read");
    end
    // split ownership: bank 0 host, bank 1 co-processor
    host_own = 2'b01;
    for (int it = 0; it < 200; it++) begin
      int ha, ca;
      ha = $urandom_range(2**AW - 1);
      ca = $urandom_range(2**AW - 1);
      @(negedge clk);
      host_addr = AW'(ha); host_we = 1; host_wdata = $urandom;
      cp_addr = AW'(ca); cp_we = 1; cp_wdata = $urandom;
      m[ha][15:0] = host_wdata[15:0];
      m[ca][31:16] = cp_wdata[31:16];
      @(negedge clk);
      host_we = 0; cp_we = 0;
      host_addr = AW'(ha); cp_addr = AW'(ca);
      @(posedge clk);
      @(negedge clk);
      chk({16'h0, host_rdata[15:0]}, {16'h0, m[ha][15:0]}, "split bank0");
      chk({16'h0, cp_rdata[31:16]}, {16'h0, m[ca][31:16]}, "split bank1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
