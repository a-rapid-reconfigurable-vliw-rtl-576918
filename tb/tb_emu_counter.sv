// tb_emu_counter: cycle-based emulation of a sequential circuit, a 2-bit
// counter with synchronous reset and enable, over many emulated clock cycles
// on the complete board model at its default size.
//
// Emulated circuit:  q0' = !rst & (q0 ^ en)     q1' = !rst & (q1 ^ (q0 & en))
// Its state starts unknown (X). One run of the basic block is one clock
// cycle of the counter. Between runs the host uploads the next state, merges
// it with the next rst/en values into the input word and downloads that.
//
// Input word: R0=q0 R1=en R4=q0 R5=en R8=rst R9=rst R13=q1.
//   bundle 1: ALU0 and  R0,R1  -> R12 (t = q0&en)
//             ALU1 xor  R4,R5  -> R9  (x0 = q0^en)
//             ALU2 nand R8,R9  -> R10 (nr = !rst)
//   bundle 2: ALU2 and  R10,R9 -> R2  (q0')
//             ALU3 xor  R12,R13 -> R11 (x1 = q1^t)
//   bundle 3: ALU2 and  R10,R11 -> R6 (q1')
// Checked against three-valued reference logic every cycle, with the run
// length. The stimulus runs with X state first, then reset, counting, a hold,
// an unknown enable and a second reset; the test counts that X state was
// seen, that reset cleared it and that the counter wrapped.
module tb_emu_counter;
  import vliw_pkg::*;
  import tern_ref_pkg::*;

  localparam int AW = 17;
  localparam int IN_ADDR = 2000, OUT_ADDR = 2001;
  localparam int N_CYC = 40;

  logic clk = 0, rst_n = 0;
  logic host_start, host_we, busy, halt;
  logic [AW-1:0] host_start_pc, host_addr;
  logic [31:0] host_wdata, host_rdata;
  int checks = 0, failures = 0;
  int n_xstate = 0, n_reset_clear = 0, n_wrap = 0;

  emu_system dut (.clk, .rst_n, .host_start, .host_start_pc, .host_addr, .host_we,
                  .host_wdata, .host_rdata, .busy, .halt);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic host_write(int a, logic [31:0] d);
    @(negedge clk);
    host_addr = AW'(a); host_we = 1; host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic host_read(int a, output logic [31:0] d);
    @(negedge clk);
    host_addr = AW'(a);
    @(posedge clk);
    @(negedge clk);
    d = host_rdata;
  endtask

  logic [31:0] prog [9];
  slot_t nop;

  initial begin
    tv_e q0, q1, dq0, dq1;
    nop = mk_slot(F_NOP, 0, 0, 0);
    prog[0] = enc_op(OP_LOAD, 27'(IN_ADDR));
    prog[1] = enc_op(OP_MOV_R2A);
    prog[2] = enc_alu(mk_slot(F_AND, 0, 0, 2'd3), mk_slot(F_XOR, 0, 0, 2'd2),
                      mk_slot(F_NAND, 0, 0, 2'd2), nop);
    prog[3] = enc_alu(nop, nop, mk_slot(F_AND, 1, 0, 2'd0), mk_slot(F_XOR, 0, 0, 2'd2));
    prog[4] = enc_alu(nop, nop, mk_slot(F_AND, 1, 1, 2'd1), nop);
    prog[5] = enc_op(OP_MOV_A2R);
    prog[6] = enc_op(OP_STORE, 27'(OUT_ADDR));
    prog[7] = enc_op(OP_HALT);
    host_start = 0; host_we = 0; host_addr = '0; host_wdata = '0;
    host_start_pc = AW'(100);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) host_write(100 + i, prog[i]);

    dq0 = VX; dq1 = VX;
    for (int c = 0; c < N_CYC; c++) begin
      tv_e rst, en, e0, e1;
      logic [1:0] r [16];
      logic [31:0] inw, outw;
      int cycles;
      // stimulus
      if (c < 2)                   begin rst = V0; en = V1; end
      else if (c == 2)             begin rst = V1; en = VX; end
      else if (c == 20 || c == 21) begin rst = V0; en = V0; end
      else if (c == 25)            begin rst = V0; en = VX; end
      else if (c == 30)            begin rst = V1; en = V1; end
      else                         begin rst = V0; en = V1; end
      q0 = dq0; q1 = dq1;
      if (q0 == VX || q1 == VX) n_xstate++;
      foreach (r[k]) r[k] = 2'b00;
      r[0] = code(q0); r[1] = code(en); r[4] = code(q0); r[5] = code(en);
      r[8] = code(rst); r[9] = code(rst); r[13] = code(q1);
      for (int k = 0; k < 16; k++) inw[2*k +: 2] = r[k];
      host_write(IN_ADDR, inw);
      @(negedge clk);
      host_start = 1;
      @(negedge clk);
      host_start = 0;
      cycles = 0;
      while (busy && cycles < 1000) begin
        cycles++;
        @(negedge clk);
      end
      chk(halt && cycles == 1 + 8 + 2, "run length");
      host_read(OUT_ADDR, outw);
      e0 = r_and(r_not(rst), r_xor(q0, en));
      e1 = r_and(r_not(rst), r_xor(q1, r_and(q0, en)));
      chk(outw[5:4] == code(e0), "q0 next");
      chk(outw[13:12] == code(e1), "q1 next");
      if (outw[5:4] != code(e0) || outw[13:12] != code(e1))
        $display("  cycle %0d rst=%0d en=%0d q=%0d%0d -> %b%b expected %b%b", c, rst, en,
                 q1, q0, outw[13:12], outw[5:4], code(e1), code(e0));
      if (rst == V1 && (q0 == VX || q1 == VX) && e0 == V0 && e1 == V0) n_reset_clear++;
      if (q0 == V1 && q1 == V1 && e0 == V0 && e1 == V0 && rst == V0) n_wrap++;
      dq0 = val(outw[5:4]);
      dq1 = val(outw[13:12]);
    end
    chk(n_xstate > 0, "unknown state emulated");
    chk(n_reset_clear > 0, "reset cleared unknown state");
    chk(n_wrap > 0, "counter wrapped");
    $display("mechanisms: x_state_cycles=%0d reset_clears=%0d wraps=%0d",
             n_xstate, n_reset_clear, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
