// tb_vliw_coproc: random basic blocks run on the co-processor and on an
// instruction-level model in the testbench; the memory images and the cycle
// counts must agree.
//
// The testbench provides the memory (one cycle read latency). Each run writes
// a random program of loads, stores, moves, zeros/ones on regR and on the
// ALU registers, and ALU bundles with random slots, ending in a halt, plus
// random data words. The model executes the same program on its own copy:
// regR, sixteen 2-bit registers and the memory, using three-valued
// reference logic for the ALUs. After halted rises the whole data area is
// compared and the run length must be 1 + one cycle per instruction + one
// extra cycle per load or store.
module tb_vliw_coproc;
  import vliw_pkg::*;
  import tern_ref_pkg::*;

  localparam int AW = 10;
  localparam int DATA_BASE = 512;
  localparam int DATA_N = 64;

  logic clk = 0, rst_n = 0, start;
  logic [AW-1:0] start_pc, mem_addr;
  logic busy, halted, stall, mem_we;
  logic [31:0] mem_wdata, mem_rdata;
  logic [31:0] mem [2**AW];
  logic [31:0] ref_mem [2**AW];
  int checks = 0, failures = 0, n_stall = 0;

  vliw_coproc #(.ADDR_W(AW)) dut (.clk, .rst_n, .start, .start_pc, .busy, .halted,
    .stall, .mem_addr, .mem_we, .mem_wdata, .mem_rdata);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    mem_rdata <= mem_we ? mem_wdata : mem[mem_addr];
  end
  always @(posedge clk) if (stall) n_stall++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference execution of one instruction; returns its cycle cost.
  logic [31:0] m_regr;
  logic [1:0]  m_r [16];

  function automatic int ref_exec(logic [31:0] w);
    logic [1:0] nr [16];
    if (w[31]) begin
      nr = m_r;
      for (int g = 0; g < 4; g++) begin
        slot_t s;
        s = slot_t'(w[7*g +: 7]);
        if (s.func != F_NOP)
          nr[4*int'(s.dst) + g] = code(r_func(int'(s.func),
                                  val(m_r[4*g + 2*int'(s.sel_a)]),
                                  val(m_r[4*g + 1 + 2*int'(s.sel_b)])));
      end
      m_r = nr;
      return 1;
    end
    case (w[30:27])
      4'd1: begin m_regr = ref_mem[w[AW-1:0]]; return 2; end
      4'd2: begin ref_mem[w[AW-1:0]] = m_regr; return 2; end
      4'd3: for (int k = 0; k < 16; k++) m_r[k] = m_regr[2*k +: 2];
      4'd4: for (int k = 0; k < 16; k++) m_regr[2*k +: 2] = m_r[k];
      4'd5: m_regr = '0;
      4'd6: foreach (m_r[k]) m_r[k] = 2'b00;
      4'd7: m_regr = '1;
      4'd8: foreach (m_r[k]) m_r[k] = 2'b11;
      default: ;
    endcase
    return 1;
  endfunction

  function automatic logic [31:0] rand_instr();
    int k;
    k = $urandom_range(9);
    if (k >= 5) return {1'b1, 3'b000, 28'($urandom)};
    case (k)
      0: return enc_op(OP_LOAD,  27'(DATA_BASE + $urandom_range(DATA_N - 1)));
      1: return enc_op(OP_STORE, 27'(DATA_BASE + $urandom_range(DATA_N - 1)));
      2: return enc_op(OP_MOV_R2A);
      3: return enc_op(OP_MOV_A2R);
      default: return enc_op(opcode_e'($urandom_range(5, 8)));
    endcase
  endfunction

  initial begin
    start = 0;
    start_pc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m_regr = 32'h5555_5555;
    foreach (m_r[k]) m_r[k] = 2'b01;
    for (int run = 0; run < 60; run++) begin
      int len, base, cycles, exp_cycles;
      len  = $urandom_range(2, 60);
      base = $urandom_range(0, 400);
      for (int a = DATA_BASE; a < DATA_BASE + DATA_N; a++)
        if ($urandom_range(3) == 0) mem[a] = $urandom;
      for (int i = 0; i < len; i++)
        mem[base + i] = (i == len - 1) ? enc_op(OP_HALT) : rand_instr();
      ref_mem = mem;
      exp_cycles = 1;
      for (int i = 0; i < len; i++) exp_cycles += ref_exec(mem[base + i]);
      @(negedge clk);
      start = 1;
      start_pc = AW'(base);
      @(negedge clk);
      start = 0;
      cycles = 0;
      while (busy && cycles < 1000) begin
        cycles++;
        @(negedge clk);
      end
      checks++;
      if (!halted || cycles != exp_cycles) begin
        failures++;
        $display("FAIL run %0d halted=%b cycles=%0d expected=%0d", run, halted, cycles, exp_cycles);
      end
      for (int a = DATA_BASE; a < DATA_BASE + DATA_N; a++) begin
        checks++;
        if (mem[a] !== ref_mem[a]) begin
          failures++;
          $display("FAIL run %0d mem[%0d]=%h expected %h", run, a, mem[a], ref_mem[a]);
        end
      end
    end
    checks++;
    if (n_stall == 0) begin
      failures++;
      $display("FAIL no load/store stall exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
