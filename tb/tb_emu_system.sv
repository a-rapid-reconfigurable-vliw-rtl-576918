// tb_emu_system: end-to-end emulation of a full adder on the complete board
// model, at the default memory size, playing the host's part.
//
// The basic block evaluates the full adder
//   aux1 = A ^ B; S = aux1 ^ CI; aux2 = A | B; aux3 = aux2 & CI;
//   aux5 = A & B; CO = aux5 | aux3
// in three ALU bundles. The input word places A, B and CI in the registers
// the schedule reads (R0=A R1=B R4=A R5=B R6=CI R8=A R9=B R13=CI):
//   bundle 1: ALU0 xor R0,R1 -> R12 (aux1)   ALU1 or  R4,R5 -> R5 (aux2)
//             ALU2 and R8,R9 -> R2 (aux5)
//   bundle 2: ALU1 and R6,R5 -> R1 (aux3)    ALU3 xor R12,R13 -> R15 (S)
//   bundle 3: ALU0 or  R2,R1 -> R0 (CO)
// The block then stores the registers, and finishes by storing an all-zeros
// regR and an all-ones register image before halting.
//
// For each of the 27 ternary input combinations the host downloads the input
// word, starts the co-processor, waits for halt, uploads the results and
// compares S and CO with three-valued reference logic. It also checks the
// run length (1 + one cycle per instruction + one extra per load/store) and
// counts the mechanisms the run must show: load/store stalls, halts, host
// downloads between runs, results routed to another ALU's registers, and
// unknown (X) values reaching an output.
module tb_emu_system;
  import vliw_pkg::*;
  import tern_ref_pkg::*;

  localparam int AW = 17;
  localparam int IN_ADDR = 1000, OUT_ADDR = 1001, Z_ADDR = 1002, O_ADDR = 1003;

  logic clk = 0, rst_n = 0;
  logic host_start, host_we, busy, halt;
  logic [AW-1:0] host_start_pc, host_addr;
  logic [31:0] host_wdata, host_rdata;
  int checks = 0, failures = 0;
  int n_stall = 0, n_halt = 0, n_download = 0, n_cross = 0, n_xout = 0;

  emu_system dut (.clk, .rst_n, .host_start, .host_start_pc, .host_addr, .host_we,
                  .host_wdata, .host_rdata, .busy, .halt);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (dut.u_cp.stall) n_stall++;

  logic [31:0] prog [12];
  int          prog_cycles;

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

  slot_t nop;

  initial begin
    nop = mk_slot(F_NOP, 0, 0, 0);
    prog[0]  = enc_op(OP_LOAD, 27'(IN_ADDR));
    prog[1]  = enc_op(OP_MOV_R2A);
    prog[2]  = enc_alu(mk_slot(F_XOR, 0, 0, 2'd3), mk_slot(F_OR, 0, 0, 2'd1),
                       mk_slot(F_AND, 0, 0, 2'd0), nop);
    prog[3]  = enc_alu(nop, mk_slot(F_AND, 1, 0, 2'd0), nop, mk_slot(F_XOR, 0, 0, 2'd3));
    prog[4]  = enc_alu(mk_slot(F_OR, 1, 0, 2'd0), nop, nop, nop);
    prog[5]  = enc_op(OP_MOV_A2R);
    prog[6]  = enc_op(OP_STORE, 27'(OUT_ADDR));
    prog[7]  = enc_op(OP_ZEROS_R);
    prog[8]  = enc_op(OP_STORE, 27'(Z_ADDR));
    prog[9]  = enc_op(OP_ONES_A);
    prog[10] = enc_op(OP_MOV_A2R);
    prog[11] = enc_op(OP_STORE, 27'(O_ADDR));
    // cost: 1 first fetch + 12 instructions + halt + 4 extra for 4 load/stores
    prog_cycles = 1 + 12 + 1 + 4;
    // bundle 1 routes ALU0 -> group 3 and ALU2 -> group 0, bundle 2 ALU1 ->
    // group 0, bundle 3 stays local: three cross-group writes per run
    host_start = 0; host_we = 0; host_addr = '0; host_wdata = '0; host_start_pc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. download the basic block
    for (int i = 0; i < 12; i++) host_write(i, prog[i]);
    host_write(12, enc_op(OP_HALT));

    for (int va = 0; va < 3; va++)
      for (int vb = 0; vb < 3; vb++)
        for (int vc = 0; vc < 3; vc++) begin
          tv_e A, B, CI, s_exp, co_exp;
          logic [1:0] r [16];
          logic [31:0] inw, outw, zw, ow;
          int cycles;
          A = tv_e'(va); B = tv_e'(vb); CI = tv_e'(vc);
          foreach (r[k]) r[k] = 2'b00;
          r[0] = code(A); r[1] = code(B); r[4] = code(A); r[5] = code(B);
          r[6] = code(CI); r[8] = code(A); r[9] = code(B); r[13] = code(CI);
          for (int k = 0; k < 16; k++) inw[2*k +: 2] = r[k];
          host_write(IN_ADDR, inw);
          n_download++;
          // 2. computing
          @(negedge clk);
          host_start = 1;
          @(negedge clk);
          host_start = 0;
          cycles = 0;
          while (busy && cycles < 1000) begin
            cycles++;
            @(negedge clk);
          end
          // 3. halt
          chk(halt, "halt raised");
          if (halt) n_halt++;
          chk(cycles == prog_cycles, "run length");
          if (cycles != prog_cycles) $display("  cycles=%0d expected=%0d", cycles, prog_cycles);
          // 4. upload
          host_read(OUT_ADDR, outw);
          host_read(Z_ADDR, zw);
          host_read(O_ADDR, ow);
          s_exp  = r_xor(r_xor(A, B), CI);
          co_exp = r_or(r_and(A, B), r_and(r_or(A, B), CI));
          chk(outw[31:30] == code(s_exp), "sum");
          chk(outw[1:0] == code(co_exp), "carry");
          if (outw[31:30] != code(s_exp) || outw[1:0] != code(co_exp))
            $display("  A=%0d B=%0d CI=%0d S=%b CO=%b", A, B, CI, outw[31:30], outw[1:0]);
          chk(outw[25:24] == code(r_xor(A, B)), "aux1 in R12");
          chk(zw == 32'h0, "zeros regR");
          chk(ow == 32'hFFFF_FFFF, "ones regALU");
          if (s_exp == VX || co_exp == VX) n_xout++;
          n_cross += 3;
        end

    chk(n_stall > 0, "load/store stall happened");
    chk(n_halt > 0, "halt happened");
    chk(n_download > 1, "host download between runs happened");
    chk(n_cross > 0, "cross-group result routing happened");
    chk(n_xout > 0, "X reached an output");
    $display("mechanisms: stalls=%0d halts=%0d downloads=%0d cross=%0d x_out=%0d",
             n_stall, n_halt, n_download, n_cross, n_xout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
