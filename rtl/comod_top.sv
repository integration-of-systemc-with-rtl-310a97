// comod_top - emulator side of the co-modeling setup.
//
// Main part: running a whole test set on the emulator. The host sends a
// single input vector whose bit 0 is initiate_test; the vector transactor
// receives it from the input macro and pulses `enable`. The controlled
// clock enable of the DUT wrapper is `enable OR IN_OK`, so once top_mem has
// raised IN_OK it keeps its own clock running and applies every stored
// vector to the Reed-Solomon coder, one per cycle, comparing the coder's
// outputs with the expected ones. The transactor's output request
// (out_avail, "newdata") reaches the output macro only through `AND OUT_VAL`,
// so the single reply - the cumulative pass/fail bit and the vector count,
// packed as {2'b00, result, vec[18:0]} into the 22-bit output vector - is
// offered only when the whole set has been checked. Two channel
// transactions replace one per vector.
//
// The co-modeling macros (input, output, reset, clock control, data gates)
// and the Reed-Solomon coder core are outside this RTL: their signals are
// ports. The controlled clock is realised as a clock enable on the system
// clock (`dut_clk_en` for the coder core); `rst` is the reset macro's output
// (active high). The test vector memories are loaded through the load_*
// ports before a run.
//
// Lint notes: only bit 0 of the 33-bit input vector carries meaning in this
// mode, so in_data[32:1] are read by nothing, and out_data[21:20] are
// constant zero; the widths are kept at the channel's full size so the host
// side does not change between streaming and stored-test-set runs.
//
// Beside it, with their own ports: the interleaver and de-interleaver of the
// concatenated-coding system (Reed-Solomon codewords <-> 2-bit symbols of
// the convolutional code), each with full-handshake data and control links
// (x_data/x_req/x_ack), and one memory wrapper that builds a clocked
// Reed-Solomon coder memory from the emulator's asynchronous memory.
module comod_top
  import comod_pkg::*;
#(
  parameter int unsigned ADDR_W      = TVM_ADDR_W,
  parameter int unsigned NUM_VECTORS = TVM_NUM_VECTORS,
  parameter int unsigned IL_ROWS     = 2,
  parameter int unsigned IL_COLS     = 128,
  parameter int unsigned IL_SYM_W    = 8,
  parameter int unsigned MEM_ADDR_W  = 7,
  parameter int unsigned MEM_DATA_W  = 8
) (
  input  logic                  clk,
  input  logic                  rst,

  // input co-modeling macro
  input  logic                  in_avail,
  input  logic [IN_VEC_W-1:0]   in_data,
  output logic                  in_done,
  // output co-modeling macro
  output logic                  out_avail,
  output logic [OUT_VEC_W-1:0]  out_data,
  input  logic                  out_done,
  output xact_state_e           xact_state,

  // test vector memory preload
  input  logic                  load_in,
  input  logic                  load_out,
  input  logic [ADDR_W-1:0]     load_addr,
  input  logic [TVM_IN_W-1:0]   load_in_data,
  input  logic [TVM_OUT_W-1:0]  load_out_data,

  // Reed-Solomon coder core pins
  output rs_in_t                rs_in,
  input  rs_out_t               rs_out,
  output logic                  dut_clk_en,

  // status
  output logic                  in_ok,
  output logic                  out_val,
  output logic                  result,
  output logic [ADDR_W-1:0]     n_mismatch,
  output logic                  match,

  // interleaver: from the RS encoder, to the convolutional encoder
  input  logic [IL_SYM_W-1:0]   il_in_data,
  input  logic                  il_in_req,
  output logic                  il_in_ack,
  input  logic                  il_in_ctrl_req,
  output logic                  il_in_ctrl_ack,
  output logic [IL_ROWS-1:0]    il_out_data,
  output logic                  il_out_req,
  input  logic                  il_out_ack,
  output logic                  il_out_ctrl_req,
  input  logic                  il_out_ctrl_ack,

  // de-interleaver: from the Viterbi decoder, to the RS decoder
  input  logic [IL_ROWS-1:0]    dil_in_data,
  input  logic                  dil_in_req,
  output logic                  dil_in_ack,
  input  logic                  dil_in_ctrl_req,
  output logic                  dil_in_ctrl_ack,
  output logic [IL_SYM_W-1:0]   dil_out_data,
  output logic                  dil_out_req,
  input  logic                  dil_out_ack,
  output logic                  dil_out_ctrl_req,
  input  logic                  dil_out_ctrl_ack,

  // Reed-Solomon coder memory (clocked RAM view)
  input  logic                  mem_ez,
  input  logic                  mem_wz,
  input  logic [MEM_ADDR_W-1:0] mem_a,
  input  logic [MEM_DATA_W-1:0] mem_d,
  output logic [MEM_DATA_W-1:0] mem_q
);

  // ---------------------------------------------------------------------
  // Testbench on the emulator
  // ---------------------------------------------------------------------
  logic              xact_enable;
  logic              xact_out_avail;
  logic              clk_en;
  logic [ADDR_W-1:0] vec;

  vector_transactor u_xact (
    .clk, .rst,
    .in_avail, .in_done,
    .out_avail(xact_out_avail), .out_done,
    .enable(xact_enable), .state(xact_state)
  );

  assign clk_en    = xact_enable || in_ok;       // OR gate before clock control
  assign out_avail = xact_out_avail && out_val;  // AND gate before output macro

  top_mem #(.ADDR_W(ADDR_W), .NUM_VECTORS(NUM_VECTORS)) u_top_mem (
    .clk, .rst, .clk_en,
    .init(in_data[0]),
    .load_in, .load_out, .load_addr, .load_in_data, .load_out_data,
    .rs_in, .rs_out, .dut_clk_en,
    .result, .vec, .in_ok, .out_val, .match, .n_mismatch
  );

  assign out_data = OUT_VEC_W'({result, vec});

  // ---------------------------------------------------------------------
  // Concatenated coding system: interleaver and de-interleaver
  // ---------------------------------------------------------------------
  ms_full_if #(.W(IL_SYM_W)) il_in_if   (.clk, .rst);
  ms_full_if #(.W(1))        il_ictl_if (.clk, .rst);
  ms_full_if #(.W(IL_ROWS))  il_out_if  (.clk, .rst);
  ms_full_if #(.W(1))        il_octl_if (.clk, .rst);

  assign il_in_if.data   = il_in_data;
  assign il_in_if.req    = il_in_req;
  assign il_in_ack       = il_in_if.ack;
  assign il_ictl_if.data = 1'b1;
  assign il_ictl_if.req  = il_in_ctrl_req;
  assign il_in_ctrl_ack  = il_ictl_if.ack;
  assign il_out_data     = il_out_if.data;
  assign il_out_req      = il_out_if.req;
  assign il_out_if.ack   = il_out_ack;
  assign il_out_ctrl_req = il_octl_if.req;
  assign il_octl_if.ack  = il_out_ctrl_ack;

  interleaver #(.ROWS(IL_ROWS), .COLS(IL_COLS), .SYM_W(IL_SYM_W)) u_interleaver (
    .clk, .rst,
    .rs_data(il_in_if), .rs_ctrl(il_ictl_if),
    .vit_data(il_out_if), .vit_ctrl(il_octl_if)
  );

  ms_full_if #(.W(IL_ROWS))  dil_in_if   (.clk, .rst);
  ms_full_if #(.W(1))        dil_ictl_if (.clk, .rst);
  ms_full_if #(.W(IL_SYM_W)) dil_out_if  (.clk, .rst);
  ms_full_if #(.W(1))        dil_octl_if (.clk, .rst);

  assign dil_in_if.data   = dil_in_data;
  assign dil_in_if.req    = dil_in_req;
  assign dil_in_ack       = dil_in_if.ack;
  assign dil_ictl_if.data = 1'b1;
  assign dil_ictl_if.req  = dil_in_ctrl_req;
  assign dil_in_ctrl_ack  = dil_ictl_if.ack;
  assign dil_out_data     = dil_out_if.data;
  assign dil_out_req      = dil_out_if.req;
  assign dil_out_if.ack   = dil_out_ack;
  assign dil_out_ctrl_req = dil_octl_if.req;
  assign dil_octl_if.ack  = dil_out_ctrl_ack;

  deinterleaver #(.ROWS(IL_ROWS), .COLS(IL_COLS), .SYM_W(IL_SYM_W)) u_deinterleaver (
    .clk, .rst,
    .vit_data(dil_in_if), .vit_ctrl(dil_ictl_if),
    .rs_data(dil_out_if), .rs_ctrl(dil_octl_if)
  );

  // ---------------------------------------------------------------------
  // Reed-Solomon coder memory on emulator memory
  // ---------------------------------------------------------------------
  rs_mem_wrapper #(.ADDR_W(MEM_ADDR_W), .DATA_W(MEM_DATA_W)) u_rs_mem (
    .CLK(clk), .EZ(mem_ez), .WZ(mem_wz), .A(mem_a), .D(mem_d), .Q(mem_q)
  );

endmodule
