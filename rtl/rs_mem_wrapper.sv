// rs_mem_wrapper - clocked Reed-Solomon coder memory ("Mem1") built on the
// emulator's asynchronous memory ("Mem2").
//
// The coder expects a synchronous RAM with address A, write data D, read
// data Q, active-low chip enable EZ and active-low write enable WZ:
//   rising CLK edge, EZ=0, WZ=0 : write D at A, and Q shows D (write-through)
//   rising CLK edge, EZ=0, WZ=1 : Q shows the word at A
//   EZ=1                        : no access, Q holds its value
// The emulator memory has only level-sensitive REN / WEN, an address and a
// data port. The wrapper logic decodes EZ/WZ into WEN (write mode) and REN
// (read mode), steers A to ADR and D to the write data, and registers the
// read data (or, in write mode, D) into Q on the rising edge of CLK, which
// gives the coder its one-cycle read latency.
// Default size 128 x 8 (7-bit A, 8-bit D), one of the coder's memories.
// The source's wrapper registers the controls, address and data before the
// memory; here they are decoded combinationally so that Q follows the
// clocked-RAM behaviour above after a single edge (see the README).
module rs_mem_wrapper #(
  parameter int unsigned ADDR_W = 7,
  parameter int unsigned DATA_W = 8
) (
  input  logic              CLK,
  input  logic              EZ,
  input  logic              WZ,
  input  logic [ADDR_W-1:0] A,
  input  logic [DATA_W-1:0] D,
  output logic [DATA_W-1:0] Q
);

  logic              ren, wen;
  logic [DATA_W-1:0] rdata;

  assign wen = !EZ && !WZ;   // write mode
  assign ren = !EZ &&  WZ;   // read mode

  emu_mem #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_mem2 (
    .clk(CLK), .ren, .wen, .adr(A), .wdata(D), .rdata
  );

  always_ff @(posedge CLK) begin
    if (wen)      Q <= D;
    else if (ren) Q <= rdata;
  end

endmodule
