// tb_instr_decoder: checks every opcode and random ALU bundles. For each
// non-ALU opcode exactly the expected control bit must be set, with the
// expected class and the address passed through; for ALU bundles the four
// slot fields must come out of the bit positions of the instruction format.
module tb_instr_decoder;
  import vliw_pkg::*;

  logic [31:0] instr;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  instr_decoder dut (.instr(instr), .ctrl(ctrl));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bits(logic [10:0] exp_bits, iclass_e exp_cls, logic [26:0] a);
    logic [10:0] got;
    got = {ctrl.load, ctrl.store, ctrl.r2a, ctrl.a2r, ctrl.zeros_r, ctrl.ones_r,
           ctrl.zeros_a, ctrl.ones_a, ctrl.alu, ctrl.halt, ctrl.illegal};
    checks++;
    if (got !== exp_bits || ctrl.iclass !== exp_cls || ctrl.addr !== a) begin
      failures++;
      $display("FAIL instr=%h bits=%b exp=%b cls=%0d exp=%0d", instr, got, exp_bits,
               ctrl.iclass, exp_cls);
    end
  endtask

  initial begin
    for (int op = 0; op < 16; op++) begin
      logic [26:0] a;
      logic [10:0] e;
      iclass_e     c;
      a = 27'($urandom);
      instr = {1'b0, 4'(op), a};
      #1;
      c = C_CTRL;
      case (op)
        1: begin e = 11'b100_0000_0000; c = C_MEM_REG; end
        2: begin e = 11'b010_0000_0000; c = C_MEM_REG; end
        3: begin e = 11'b001_0000_0000; c = C_REG_REG; end
        4: begin e = 11'b000_1000_0000; c = C_REG_REG; end
        5: begin e = 11'b000_0100_0000; c = C_REG_REG; end
        6: begin e = 11'b000_0001_0000; c = C_REG_REG; end
        7: begin e = 11'b000_0010_0000; c = C_REG_REG; end
        8: begin e = 11'b000_0000_1000; c = C_REG_REG; end
        15: e = 11'b000_0000_0010;
        0: e = 11'b000_0000_0000;
        default: e = 11'b000_0000_0001;
      endcase
      expect_bits(e, c, a);
    end
    for (int it = 0; it < 500; it++) begin
      instr = {1'b1, 31'($urandom)};
      #1;
      expect_bits(11'b000_0000_0100, C_ALU, instr[26:0]);
      for (int g = 0; g < 4; g++) begin
        checks++;
        if (ctrl.slots[g].func  !== alu_func_e'(instr[7*g+4 +: 3]) ||
            ctrl.slots[g].sel_a !== instr[7*g+3] ||
            ctrl.slots[g].sel_b !== instr[7*g+2] ||
            ctrl.slots[g].dst   !== instr[7*g +: 2]) begin
          failures++;
          $display("FAIL slot %0d of %h", g, instr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
