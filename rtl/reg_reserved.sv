// reg_reserved: the 32-bit register "Reserved" (regR) of the co-processor.
//
// regR is the only path between the memory and the ALU registers: a load
// writes a memory word into it, a store writes it to memory, and the two
// moves copy it to or from all sixteen 2-bit ALU registers at once. It can
// also be set to all ternary 0 (all bits 0) or all ternary 1 (all bits 1).
// These operations are the design's; reset to all X (2'b01 in every field)
// is this implementation's choice.
//
// One clock cycle per operation; ld_mem, ld_alu, zeros and ones are mutually
// exclusive, and q holds its value when none is active.
module reg_reserved
  import vliw_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ld_mem,
  input  logic [WORD_W-1:0] mem_data,
  input  logic              ld_alu,
  input  logic [WORD_W-1:0] alu_data,
  input  logic              zeros,
  input  logic              ones,
  output logic [WORD_W-1:0] q
);

  localparam logic [WORD_W-1:0] ALL_X = {(WORD_W/2){T_X}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= ALL_X;
    else if (ld_mem) q <= mem_data;
    else if (ld_alu) q <= alu_data;
    else if (zeros)  q <= '0;
    else if (ones)   q <= '1;
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({ld_mem, ld_alu, zeros, ones}))
    else $error("reg_reserved: conflicting loads");

endmodule
