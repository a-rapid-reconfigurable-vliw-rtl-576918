// vliw_pkg: types and constants shared by the ternary VLIW co-processor.
//
// Ternary values are held in two bits, following the encoding the design
// is built around: 0 = 2'b00, 1 = 2'b11, X (unknown) = 2'b01. The code
// 2'b10 never arises from the ALUs; it is read as X wherever it appears.
//
// The co-processor has a 32-bit word, a 32-bit register "Reserved" (regR)
// and sixteen 2-bit ALU registers R0..R15, so regR holds exactly the sixteen
// ALU registers: regR[2k+1:2k] <-> Rk. The instruction set (load, store, the
// two moves, zeros/ones on regR and on the ALU registers, the ALU bundle and
// a halt) follows the design; the bit layout of the instruction word below
// is this implementation's own choice:
//
//   bit 31 = 1 : ALU bundle, four 7-bit slots, slot g in bits [7g+6:7g]
//                  [6:4] func   (alu_func_e)
//                  [3]   sel_a  operand A of ALU g: 0 -> R(4g+0), 1 -> R(4g+2)
//                  [2]   sel_b  operand B of ALU g: 0 -> R(4g+1), 1 -> R(4g+3)
//                  [1:0] dst    result goes to register R(4*dst+g)
//                bits [30:28] are reserved and ignored.
//   bit 31 = 0 : [30:27] opcode (opcode_e), [26:0] word address (load/store)
package vliw_pkg;

  typedef logic [1:0] tern_t;

  localparam tern_t T_0 = 2'b00;
  localparam tern_t T_1 = 2'b11;
  localparam tern_t T_X = 2'b01;

  localparam int unsigned WORD_W   = 32;
  localparam int unsigned N_ALU    = 4;
  localparam int unsigned REG_PER_ALU = 4;
  localparam int unsigned N_REG    = N_ALU * REG_PER_ALU;   // R0..R15
  localparam int unsigned SLOT_W   = 7;

  // Per-slot ALU function. The four base operations (and, or, xor,
  // implication) and the complements of and/or/xor; operand order gives the
  // mirrored implication.
  typedef enum logic [2:0] {
    F_NOP  = 3'd0,
    F_AND  = 3'd1,
    F_OR   = 3'd2,
    F_XOR  = 3'd3,
    F_IMP  = 3'd4,   // !A | B
    F_NAND = 3'd5,
    F_NOR  = 3'd6,
    F_XNOR = 3'd7
  } alu_func_e;

  typedef struct packed {
    alu_func_e   func;
    logic        sel_a;
    logic        sel_b;
    logic [1:0]  dst;
  } slot_t;

  typedef enum logic [3:0] {
    OP_NOP     = 4'd0,
    OP_LOAD    = 4'd1,   // load [Mem] -> regR
    OP_STORE   = 4'd2,   // store regR -> [Mem]
    OP_MOV_R2A = 4'd3,   // mov regR -> regALU
    OP_MOV_A2R = 4'd4,   // mov regALU -> regR
    OP_ZEROS_R = 4'd5,
    OP_ZEROS_A = 4'd6,
    OP_ONES_R  = 4'd7,
    OP_ONES_A  = 4'd8,
    OP_HALT    = 4'd15   // halt basic block
  } opcode_e;

  typedef enum logic [1:0] {
    C_MEM_REG = 2'd0,    // load / store
    C_REG_REG = 2'd1,    // moves, zeros/ones
    C_ALU     = 2'd2,    // ALU bundle
    C_CTRL    = 2'd3     // nop / halt
  } iclass_e;

  // Decoded control bundle, one per executed instruction.
  typedef struct packed {
    iclass_e     iclass;
    logic        load;
    logic        store;
    logic        r2a;        // regR -> ALU registers
    logic        a2r;        // ALU registers -> regR
    logic        zeros_r;
    logic        ones_r;
    logic        zeros_a;
    logic        ones_a;
    logic        alu;        // ALU bundle: slots valid
    logic        halt;
    logic        illegal;    // unused opcode (executed as nop)
    logic [26:0] addr;
    slot_t [N_ALU-1:0] slots;
  } ctrl_t;

  // Ternary complement: 0 <-> 1, X stays X.
  function automatic tern_t tnot(tern_t a);
    unique case (a)
      T_0:     return T_1;
      T_1:     return T_0;
      default: return T_X;
    endcase
  endfunction

  // Map the unused code 2'b10 to X.
  function automatic tern_t tnorm(tern_t a);
    return (a == 2'b10) ? T_X : a;
  endfunction

  // Instruction word builders (used by testbenches and program generators).
  function automatic logic [31:0] enc_op(opcode_e op, logic [26:0] addr = '0);
    return {1'b0, op, addr};
  endfunction

  function automatic logic [31:0] enc_alu(slot_t s0, slot_t s1, slot_t s2, slot_t s3);
    return {1'b1, 3'b000, s3, s2, s1, s0};
  endfunction

  function automatic slot_t mk_slot(alu_func_e f, logic sa, logic sb, logic [1:0] d);
    slot_t s;
    s.func = f; s.sel_a = sa; s.sel_b = sb; s.dst = d;
    return s;
  endfunction

endpackage
