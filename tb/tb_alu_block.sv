// tb_alu_block: random test of the ALU block against a register-level model.
// Each cycle applies one of: an ALU bundle with random slots, a load of all
// sixteen registers, zeros, ones or nothing. The model keeps its own R0..R15,
// applies the operand selection (A from R(4g)/R(4g+2), B from R(4g+1)/R(4g+3))
// and the result routing (ALU g -> R(4*dst+g)) with three-valued reference
// logic, and the full register image is compared after every cycle. A count
// of results routed to another ALU's group makes sure the interconnect was
// exercised.
module tb_alu_block;
  import vliw_pkg::*;
  import tern_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic alu_en, load_all, set_zeros, set_ones;
  slot_t [N_ALU-1:0] slots;
  logic [31:0] load_data, regs_q;
  int checks = 0, failures = 0, n_cross = 0;
  tv_e m [16];
  tv_e nm [16];

  alu_block dut (.clk, .rst_n, .alu_en, .slots, .load_all, .load_data,
                 .set_zeros, .set_ones, .regs_q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    checks++;
    for (int k = 0; k < 16; k++)
      if (regs_q[2*k +: 2] !== code(m[k])) begin
        failures++;
        $display("FAIL %s R%0d=%b exp=%b", what, k, regs_q[2*k +: 2], code(m[k]));
        break;
      end
  endtask

  initial begin
    {alu_en, load_all, set_zeros, set_ones} = '0;
    slots = '0;
    load_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (m[k]) m[k] = VX;
    @(negedge clk);
    compare("reset");
    for (int it = 0; it < 3000; it++) begin
      int kind;
      kind = $urandom_range(9);
      {alu_en, load_all, set_zeros, set_ones} = '0;
      nm = m;
      if (kind == 0) begin
        load_all = 1;
        for (int k = 0; k < 16; k++) begin
          nm[k] = rand_tv();
          load_data[2*k +: 2] = code(nm[k]);
        end
      end else if (kind == 1) begin
        set_zeros = 1;
        foreach (nm[k]) nm[k] = V0;
      end else if (kind == 2) begin
        set_ones = 1;
        foreach (nm[k]) nm[k] = V1;
      end else if (kind < 9) begin
        alu_en = 1;
        for (int g = 0; g < 4; g++) begin
          int f, sa, sb, d;
          f = $urandom_range(7); sa = $urandom_range(1);
          sb = $urandom_range(1); d = $urandom_range(3);
          slots[g] = mk_slot(alu_func_e'(f), 1'(sa), 1'(sb), 2'(d));
          if (f != 0) begin
            nm[4*d + g] = r_func(f, m[4*g + 2*sa], m[4*g + 1 + 2*sb]);
            if (d != g) n_cross++;
          end
        end
      end
      @(posedge clk);
      m = nm;
      @(negedge clk);
      compare("step");
    end
    checks++;
    if (n_cross == 0) begin
      failures++;
      $display("FAIL no n_cross-group routing exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
