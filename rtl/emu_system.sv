// emu_system: the emulation board as seen by the host computer: the VLIW
// co-processor and its instruction/data memory.
//
// The host works in the cycle the design describes:
//   1. download: with the co-processor idle, write the basic block's
//      instructions and the input values into memory (host_we/host_addr);
//   2. computing: pulse host_start; busy rises and the co-processor runs the
//      basic block from host_start_pc;
//   3. halt: when the halt instruction executes, busy falls and halt rises;
//   4. upload: read results back (host_addr, host_rdata one cycle later);
//   5. reset: the next host_start begins the next emulation cycle.
// Memory banks belong to the host whenever the co-processor is not busy,
// and to the co-processor while it runs. The host interface here is a plain
// synchronous port standing for the PCI interface of the board, whose logic
// is not part of this design.
module emu_system #(
  parameter int unsigned ADDR_W = 17
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              host_start,
  input  logic [ADDR_W-1:0] host_start_pc,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic              host_we,
  input  logic [31:0]       host_wdata,
  output logic [31:0]       host_rdata,
  output logic              busy,
  output logic              halt
);

  logic [ADDR_W-1:0] cp_addr;
  logic              cp_we;
  logic [31:0]       cp_wdata, cp_rdata;

  vliw_coproc #(.ADDR_W(ADDR_W)) u_cp (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (host_start),
    .start_pc  (host_start_pc),
    .busy      (busy),
    .halted    (halt),
    .stall     (),
    .mem_addr  (cp_addr),
    .mem_we    (cp_we),
    .mem_wdata (cp_wdata),
    .mem_rdata (cp_rdata)
  );

  board_memory #(.ADDR_W(ADDR_W)) u_mem (
    .clk        (clk),
    .host_own   ({2{!busy}}),
    .cp_addr    (cp_addr),
    .cp_we      (cp_we),
    .cp_wdata   (cp_wdata),
    .cp_rdata   (cp_rdata),
    .host_addr  (host_addr),
    .host_we    (host_we),
    .host_wdata (host_wdata),
    .host_rdata (host_rdata)
  );

  // The host may only write memory while the co-processor is idle.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !host_we)
    else $error("emu_system: host write while the co-processor is running");

endmodule
