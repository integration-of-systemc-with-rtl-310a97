// tvm - test vector memory (input TVM or output TVM).
//
// Holds one word per test vector. The word at `address` is read without a
// clock, as the emulator's memories are asynchronous, and is presented on
// `data_out` while `readwr` (the memory enable) is high; with the enable
// low the output is zero. Contents are preloaded before a run through the
// write port (`load`, `load_addr`, `load_data`), written on the rising edge
// of clk; on the emulator this happens when the design is downloaded.
//
// DEPTH is 2**ADDR_W (19 address bits by default, as in the source); WIDTH
// is 36 for the input TVM and 22 for the output TVM. The write port is this
// design's choice: the source only calls its `load` pin a dummy port.
module tvm #(
  parameter int unsigned ADDR_W = 19,
  parameter int unsigned WIDTH  = 36
) (
  input  logic              clk,
  input  logic              readwr,
  input  logic [ADDR_W-1:0] address,
  output logic [WIDTH-1:0]  data_out,
  input  logic              load,
  input  logic [ADDR_W-1:0] load_addr,
  input  logic [WIDTH-1:0]  load_data
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load) mem[load_addr] <= load_data;
  end

  assign data_out = readwr ? mem[address] : '0;

endmodule
