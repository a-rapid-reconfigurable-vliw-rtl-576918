// tb_ternary_alu: exhaustive check of the ternary ALU against three-valued
// reference logic: every function code and every pair of input codes,
// including the unused code 10, which must behave as X.
module tb_ternary_alu;
  import vliw_pkg::*;
  import tern_ref_pkg::*;

  alu_func_e func;
  tern_t     a, b, y;
  logic      valid;
  int checks = 0, failures = 0;

  ternary_alu dut (.func(func), .a(a), .b(b), .y(y), .valid(valid));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 8; f++)
      for (int ia = 0; ia < 4; ia++)
        for (int ib = 0; ib < 4; ib++) begin
          func = alu_func_e'(f);
          a = 2'(ia);
          b = 2'(ib);
          #1;
          checks++;
          if (f == 0) begin
            if (valid !== 1'b0) begin
              failures++;
              $display("FAIL nop valid=%b", valid);
            end
          end else if (!valid || y !== code(r_func(f, val(a), val(b)))) begin
            failures++;
            $display("FAIL func=%0d a=%b b=%b y=%b exp=%b", f, a, b, y,
                     code(r_func(f, val(a), val(b))));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
