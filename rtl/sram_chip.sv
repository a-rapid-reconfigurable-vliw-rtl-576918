// sram_chip: one byte-wide SRAM of the emulation board's compute memory
// (the board carries four, 128K x 8 as normally supplied, up to 512K x 8).
//
// Modelled as a synchronous single-port RAM: address, write enable and data
// are sampled at the clock edge; a read returns the word in q the cycle
// after. The board's parts are asynchronous SRAMs; the registered read is
// this implementation's choice so the memory maps onto on-chip RAM and the
// co-processor sees a fixed one-cycle latency. A write also returns the
// written byte (write-first).
module sram_chip #(
  parameter int unsigned ADDR_W = 17
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [7:0]        d,
  output logic [7:0]        q
);

  logic [7:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[addr] <= d;
      q         <= d;
    end else begin
      q <= mem[addr];
    end
  end

endmodule
