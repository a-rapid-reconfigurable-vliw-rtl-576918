// board_memory: the unified instruction/data memory of the emulation board.
//
// Four byte-wide SRAMs form a 32-bit word. They are grouped in two banks of
// two chips: bank 0 holds bits [15:0], bank 1 bits [31:16]. Each bank has
// its own address/data multiplexer that connects it either to the
// co-processor or to the host side (the PCI interface), so the host can
// download programs and input vectors and upload results while the
// co-processor is idle. host_own[b] = 1 gives bank b to the host.
//
// The bank organisation and the per-bank multiplexers follow the board
// drawing; the word width seen by the co-processor is its 32-bit bus.
// Both sides read through the same registered data bus: the word addressed
// at one clock edge appears on cp_rdata and host_rdata after it.
module board_memory #(
  parameter int unsigned ADDR_W = 17
) (
  input  logic              clk,
  input  logic [1:0]        host_own,
  // co-processor side
  input  logic [ADDR_W-1:0] cp_addr,
  input  logic              cp_we,
  input  logic [31:0]       cp_wdata,
  output logic [31:0]       cp_rdata,
  // host side
  input  logic [ADDR_W-1:0] host_addr,
  input  logic              host_we,
  input  logic [31:0]       host_wdata,
  output logic [31:0]       host_rdata
);

  logic [31:0] q;

  for (genvar b = 0; b < 2; b++) begin : g_bank
    logic [ADDR_W-1:0] addr;
    logic              we;
    logic [15:0]       d;

    always_comb begin
      addr = host_own[b] ? host_addr : cp_addr;
      we   = host_own[b] ? host_we   : cp_we;
      d    = host_own[b] ? host_wdata[16*b +: 16] : cp_wdata[16*b +: 16];
    end

    for (genvar c = 0; c < 2; c++) begin : g_chip
      sram_chip #(.ADDR_W(ADDR_W)) u_sram (
        .clk  (clk),
        .addr (addr),
        .we   (we),
        .d    (d[8*c +: 8]),
        .q    (q[16*b + 8*c +: 8])
      );
    end
  end

  assign cp_rdata   = q;
  assign host_rdata = q;

endmodule
