// instr_decoder: the "Instruction Decoding" block of the co-processor.
//
// Splits a 32-bit instruction word into the control bundle ctrl_t: which
// class it belongs to (memory-register, register-register, ALU, control)
// and which single action it performs. Bit 31 set marks an ALU bundle whose
// four 7-bit slots drive the four ALUs in parallel; otherwise bits [30:27]
// are the opcode and bits [26:0] the word address of a load or store. The
// instruction set is the design's; the field layout is this implementation's
// (see vliw_pkg). Unused opcodes are flagged illegal and do nothing.
//
// Purely combinational.
module instr_decoder
  import vliw_pkg::*;
(
  input  logic [WORD_W-1:0] instr,
  output ctrl_t             ctrl
);

  opcode_e op;

  always_comb begin
    op   = opcode_e'(instr[30:27]);
    ctrl = '0;
    ctrl.addr = instr[26:0];
    for (int g = 0; g < N_ALU; g++)
      ctrl.slots[g] = slot_t'(instr[SLOT_W*g +: SLOT_W]);

    if (instr[31]) begin
      ctrl.iclass = C_ALU;
      ctrl.alu    = 1'b1;
    end else begin
      unique case (op)
        OP_LOAD:    begin ctrl.iclass = C_MEM_REG; ctrl.load    = 1'b1; end
        OP_STORE:   begin ctrl.iclass = C_MEM_REG; ctrl.store   = 1'b1; end
        OP_MOV_R2A: begin ctrl.iclass = C_REG_REG; ctrl.r2a     = 1'b1; end
        OP_MOV_A2R: begin ctrl.iclass = C_REG_REG; ctrl.a2r     = 1'b1; end
        OP_ZEROS_R: begin ctrl.iclass = C_REG_REG; ctrl.zeros_r = 1'b1; end
        OP_ONES_R:  begin ctrl.iclass = C_REG_REG; ctrl.ones_r  = 1'b1; end
        OP_ZEROS_A: begin ctrl.iclass = C_REG_REG; ctrl.zeros_a = 1'b1; end
        OP_ONES_A:  begin ctrl.iclass = C_REG_REG; ctrl.ones_a  = 1'b1; end
        OP_HALT:    begin ctrl.iclass = C_CTRL;    ctrl.halt    = 1'b1; end
        OP_NOP:     ctrl.iclass = C_CTRL;
        default:    begin ctrl.iclass = C_CTRL;    ctrl.illegal = 1'b1; end
      endcase
    end
  end

endmodule
