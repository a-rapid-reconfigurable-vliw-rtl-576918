// vliw_coproc: the bit-wide VLIW co-processor for cycle-based ternary logic
// emulation.
//
// One run executes one basic block: straight-line code that evaluates every
// assignment of the emulated circuit once, which is one cycle of the
// emulated design. The datapath is pc -> memory -> instruction decoding ->
// ALU block / register Reserved, all sharing one 32-bit memory port:
//
//   vliw_fetch     pc, run/halt state, memory port sharing (fetch vs. data)
//   instr_decoder  instruction word -> control bundle
//   alu_block      four ternary ALUs, R0..R15, operand muxes, result demuxes
//   reg_reserved   32-bit regR between memory and the ALU registers
//
// Operation: start loads pc with start_pc and sets busy. The word fetched in
// one cycle is executed in the next: an ALU bundle performs up to four
// two-input ternary operations at once, a move copies all sixteen ALU
// registers to or from regR, a load or store moves regR from or to memory
// and holds off the next fetch for one cycle. A halt instruction clears busy
// and raises halted, the "halt basic block" signal to the host.
//
// The memory itself is outside (board_memory) and must answer a read one
// cycle after the address, as the synchronous SRAM model does.
//
// The division into these blocks and their connections follow the design's
// datapath; the overlap of fetch with execution, and keeping register
// contents from one basic block to the next, are this implementation's.
module vliw_coproc
  import vliw_pkg::*;
#(
  parameter int unsigned ADDR_W = 17
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] start_pc,
  output logic              busy,
  output logic              halted,
  output logic              stall,
  output logic [ADDR_W-1:0] mem_addr,
  output logic              mem_we,
  output logic [31:0]       mem_wdata,
  input  logic [31:0]       mem_rdata
);

  ctrl_t             ctrl;
  logic              v, load_valid;
  logic [31:0]       regr_q, regs_q;


  instr_decoder u_dec (
    .instr (mem_rdata),
    .ctrl  (ctrl)
  );

  vliw_fetch #(.ADDR_W(ADDR_W)) u_fetch (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .start_pc    (start_pc),
    .ex_data     (v && (ctrl.load || ctrl.store)),
    .ex_halt     (v && ctrl.halt),
    .data_addr   (ctrl.addr[ADDR_W-1:0]),
    .data_we     (ctrl.store),
    .data_wdata  (regr_q),
    .mem_addr    (mem_addr),
    .mem_we      (mem_we),
    .mem_wdata   (mem_wdata),
    .instr_valid (v),
    .load_valid  (load_valid),
    .stall       (stall),
    .busy        (busy),
    .halted      (halted),
    .pc          ()
  );

  alu_block u_alu (
    .clk       (clk),
    .rst_n     (rst_n),
    .alu_en    (v && ctrl.alu),
    .slots     (ctrl.slots),
    .load_all  (v && ctrl.r2a),
    .load_data (regr_q),
    .set_zeros (v && ctrl.zeros_a),
    .set_ones  (v && ctrl.ones_a),
    .regs_q    (regs_q)
  );

  reg_reserved u_regr (
    .clk      (clk),
    .rst_n    (rst_n),
    .ld_mem   (load_valid),
    .mem_data (mem_rdata),
    .ld_alu   (v && ctrl.a2r),
    .alu_data (regs_q),
    .zeros    (v && ctrl.zeros_r),
    .ones     (v && ctrl.ones_r),
    .q        (regr_q)
  );

endmodule
