// tb_vliw_fetch: runs random straight-line programs through the fetch unit.
// A small registered-read memory in the testbench holds, per word, a kind
// (plain, load, store, halt) and a data address. The testbench checks that
// instructions are fetched from consecutive addresses starting at start_pc,
// that each load/store takes the memory port in the cycle it executes (with
// the right address and write enable) and delays the next fetch, that load
// data is flagged the cycle after, that halt ends the run, and that the run
// takes 1 + (plain + halt) + 2 * (load + store) cycles.
module tb_vliw_fetch;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0, start;
  logic [AW-1:0] start_pc, data_addr, mem_addr, pc;
  logic ex_data, ex_halt, data_we, mem_we;
  logic [31:0] data_wdata, mem_wdata, rdata;
  logic instr_valid, load_valid, stall, busy, halted;
  logic [31:0] mem [2**AW];
  int checks = 0, failures = 0, n_stall = 0, n_load = 0;

  vliw_fetch #(.ADDR_W(AW)) dut (.clk, .rst_n, .start, .start_pc, .ex_data, .ex_halt,
    .data_addr, .data_we, .data_wdata, .mem_addr, .mem_we, .mem_wdata,
    .instr_valid, .load_valid, .stall, .busy, .halted, .pc);

  always #5 clk = ~clk;
  always_ff @(posedge clk) rdata <= mem[mem_addr];

  // word: [31:30] kind (0 plain, 1 load, 2 store, 3 halt), [AW-1:0] data address
  always_comb begin
    ex_data    = instr_valid && (rdata[31:30] == 2'd1 || rdata[31:30] == 2'd2);
    ex_halt    = instr_valid && (rdata[31:30] == 2'd3);
    data_we    = rdata[31:30] == 2'd2;
    data_addr  = rdata[AW-1:0];
    data_wdata = 32'hCAFE_0000 | 32'(rdata[AW-1:0]);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    start = 0;
    start_pc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 40; run++) begin
      int len, base, expect_cycles, cycles, next_fetch, prev_kind;
      len  = $urandom_range(1, 30);
      base = $urandom_range(0, 2**AW - 64);
      expect_cycles = 1;
      for (int i = 0; i < len; i++) begin
        int k;
        k = (i == len - 1) ? 3 : $urandom_range(2);
        mem[base + i] = {2'(k), 20'h0, AW'($urandom)};
        expect_cycles += (k == 1 || k == 2) ? 2 : 1;
      end
      @(negedge clk);
      start = 1;
      start_pc = AW'(base);
      @(negedge clk);
      start = 0;
      cycles = 0;
      next_fetch = base;
      prev_kind = -1;
      while (busy) begin
        cycles++;
        // a load executed last cycle: its data is on the bus now
        chk(load_valid == (prev_kind == 1), "load_valid");
        if (load_valid) n_load++;
        prev_kind = -1;
        if (instr_valid) prev_kind = int'(rdata[31:30]);
        if (stall) begin
          n_stall++;
          chk(mem_addr == rdata[AW-1:0] && mem_we == (rdata[31:30] == 2'd2),
              "data access");
          if (mem_we) chk(mem_wdata == data_wdata, "store data");
        end else if (!ex_halt) begin
          chk(mem_addr == AW'(next_fetch) && !mem_we, "fetch address");
          next_fetch++;
        end
        @(negedge clk);
        if (cycles > 1000) break;
      end
      chk(cycles == expect_cycles, "cycle count");
      if (cycles != expect_cycles)
        $display("  cycles=%0d expected=%0d", cycles, expect_cycles);
      chk(halted && !busy, "halted");
    end
    chk(n_stall > 0 && n_load > 0, "stalls and loads exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
