// alu_block: the four ALUs of the co-processor with their sixteen ternary
// registers R0..R15 and the interconnect between them.
//
// ALU g owns registers R(4g)..R(4g+3). Two operand multiplexers sit in front
// of it: operand A is R(4g+0) or R(4g+2), operand B is R(4g+1) or R(4g+3).
// The ALU result goes to a demultiplexer that can write it into register
// slot g of any group, R(4*dst+g): ALU 0 reaches R0, R4, R8, R12, ALU 3
// reaches R3, R7, R11, R15. So a value computed by one ALU is passed to any
// other ALU in the same cycle it is written, and the four ALUs never write
// the same register. This wiring is read from the ALU-block drawing of the
// design; the 1-bit operand selects and the 2-bit destination field are
// this implementation's encoding of it.
//
// Besides the ALU bundle, the registers can be loaded all at once from the
// 32-bit register Reserved (regR[2k+1:2k] -> Rk), cleared to all 0 or all 1
// ("zeros regALU", "ones regALU"), and read all at once (regs_q). At reset
// every register holds X, the value of an uninitialised net in emulation.
//
// Timing: operands are read and results written in the same clock cycle
// (alu_en high); results are visible in regs_q the next cycle. load_all,
// set_zeros, set_ones and alu_en are mutually exclusive.
module alu_block
  import vliw_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 alu_en,
  input  slot_t [N_ALU-1:0]    slots,
  input  logic                 load_all,
  input  logic [WORD_W-1:0]    load_data,
  input  logic                 set_zeros,
  input  logic                 set_ones,
  output logic [WORD_W-1:0]    regs_q
);

  tern_t r_q [N_REG];
  tern_t opa [N_ALU];
  tern_t opb [N_ALU];
  tern_t res [N_ALU];
  logic  res_v [N_ALU];

  // Operand multiplexers and ALUs.
  for (genvar g = 0; g < N_ALU; g++) begin : g_alu
    always_comb begin
      opa[g] = slots[g].sel_a ? r_q[4*g+2] : r_q[4*g+0];
      opb[g] = slots[g].sel_b ? r_q[4*g+3] : r_q[4*g+1];
    end
    ternary_alu u_alu (
      .func  (slots[g].func),
      .a     (opa[g]),
      .b     (opb[g]),
      .y     (res[g]),
      .valid (res_v[g])
    );
  end

  // Registers with their result demultiplexers: register R(4j+g) listens to
  // ALU g when that ALU's destination field selects group j.
  for (genvar j = 0; j < N_ALU; j++) begin : g_grp
    for (genvar g = 0; g < N_ALU; g++) begin : g_reg
      localparam int K = 4 * j + g;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)
          r_q[K] <= T_X;
        else if (load_all)
          r_q[K] <= load_data[2*K +: 2];
        else if (set_zeros)
          r_q[K] <= T_0;
        else if (set_ones)
          r_q[K] <= T_1;
        else if (alu_en && res_v[g] && (slots[g].dst == 2'(j)))
          r_q[K] <= res[g];
      end
    end
  end

  always_comb
    for (int k = 0; k < N_REG; k++) regs_q[2*k +: 2] = r_q[k];

  // Only one register-wide operation per cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({alu_en, load_all, set_zeros, set_ones}))
    else $error("alu_block: conflicting register operations");

endmodule
