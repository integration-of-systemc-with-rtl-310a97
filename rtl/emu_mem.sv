// emu_mem - memory of the emulation system (the "Mem2" side of a memory
// wrapper).
//
// A single-ported memory with one address port (adr), separate read and
// write enables (ren, wen) and a data port split into write data (wdata)
// and read data (rdata). Reads are asynchronous: rdata shows the word at
// adr while ren is high and is zero otherwise. A write stores wdata at adr
// on the rising edge of clk while wen is high; the source's memories have
// their write enables driven by neighbouring logic clocked by the system
// clock, and this model takes that clock as the write strobe.
// The default size is the physical 64K x 32 memory of the emulator boards.
module emu_mem #(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              ren,
  input  logic              wen,
  input  logic [ADDR_W-1:0] adr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2 ** ADDR_W];

  always_ff @(posedge clk) begin
    if (wen) mem[adr] <= wdata;
  end

  assign rdata = ren ? mem[adr] : '0;

endmodule
