// vliw_fetch: program counter, run/halt state and the sharing of the single
// memory port between instruction fetch and load/store.
//
// Instructions and data live in one memory with one port, so fetching and a
// load or store cannot happen in the same cycle. The unit fetches the word at
// pc every cycle while running; the memory answers one cycle later
// (instr_valid), when the instruction is decoded and executed. If that
// instruction is a load or store, the port is given to it for that cycle and
// the fetch of the next instruction waits one cycle (stall). A load's data
// arrives the cycle after (load_valid). So ALU, move and zeros/ones
// instructions take one cycle each, loads and stores two. A halt instruction
// stops fetching, clears busy and raises halted until the next start.
//
// start (one cycle) sets pc to start_pc and begins a basic block; it may also
// be given while running, which restarts. The unit has no branches: a basic
// block is straight-line code ending in a halt. The single port and the halt
// come from the design; the fetch/execute overlap and the cycle counts are
// this implementation's.
module vliw_fetch #(
  parameter int unsigned ADDR_W = 17
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] start_pc,
  // from the instruction being executed this cycle (already qualified by instr_valid)
  input  logic              ex_data,      // load or store
  input  logic              ex_halt,
  input  logic [ADDR_W-1:0] data_addr,
  input  logic              data_we,
  input  logic [31:0]       data_wdata,
  // memory port
  output logic [ADDR_W-1:0] mem_addr,
  output logic              mem_we,
  output logic [31:0]       mem_wdata,
  // status
  output logic              instr_valid,
  output logic              load_valid,
  output logic              stall,
  output logic              busy,
  output logic              halted,
  output logic [ADDR_W-1:0] pc
);

  logic fetch_q, load_q, do_fetch;

  assign instr_valid = fetch_q;
  assign load_valid  = load_q;

  always_comb begin
    stall     = busy && ex_data;
    do_fetch  = busy && !ex_data && !ex_halt;
    mem_addr  = stall ? data_addr : pc;
    mem_we    = stall && data_we;
    mem_wdata = data_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      busy    <= 1'b0;
      halted  <= 1'b0;
      fetch_q <= 1'b0;
      load_q  <= 1'b0;
    end else if (start) begin
      pc      <= start_pc;
      busy    <= 1'b1;
      halted  <= 1'b0;
      fetch_q <= 1'b0;
      load_q  <= 1'b0;
    end else begin
      fetch_q <= do_fetch;
      load_q  <= stall && !data_we;
      if (do_fetch) pc <= pc + 1'b1;
      if (busy && ex_halt) begin
        busy   <= 1'b0;
        halted <= 1'b1;
      end
    end
  end

  // An instruction is only executed in the cycle after its fetch.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (ex_data || ex_halt) |-> instr_valid)
    else $error("vliw_fetch: execute without a fetched instruction");

endmodule
