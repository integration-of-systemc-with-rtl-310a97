// top_mem - top-level DUT wrapper for running a test set on the emulator.
//
// The whole test set lives next to the DUT: an input TVM holds one 36-bit
// stimulus word per vector and an output TVM the 22-bit expected response.
// After `init` (the initiate_test bit) is seen on an enabled clock edge,
// the vector counter sweeps addresses 0 .. NUM_VECTORS-1, one per enabled
// cycle. In cycle k the input TVM word k drives the pins of the
// Reed-Solomon coder (rs_in, split as i1, i2[10:0], i3, i4, i5[4:0], i6,
// i7[15:0] from bit 35 down) and the coder's outputs, concatenated as
// data_out & data_out_size & ready & data_valid & enc_complete &
// dec_complete, are compared with output TVM word k; the comparison is
// ANDed into the cumulative pass/fail flag. After the last vector IN_OK
// falls, OUT_VAL rises, and `result` and `vec` (the number of vectors
// applied) are held for the transactor to send to the host.
//
// The coder core itself is not part of this RTL: its pins are ports here.
// It must be clocked by clk with `dut_clk_en` as clock enable, which is high
// only on the enabled edges of a run, so the core sees exactly one edge per
// vector. The TVMs are enabled (readwr) while IN_OK is high. clk_en is the
// controlled-clock enable (transactor enable OR IN_OK). Reset is
// synchronous, active high.
module top_mem
  import comod_pkg::*;
#(
  parameter int unsigned ADDR_W      = TVM_ADDR_W,
  parameter int unsigned NUM_VECTORS = TVM_NUM_VECTORS
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clk_en,
  input  logic                 init,
  // preload of the test vector memories
  input  logic                 load_in,
  input  logic                 load_out,
  input  logic [ADDR_W-1:0]    load_addr,
  input  logic [TVM_IN_W-1:0]  load_in_data,
  input  logic [TVM_OUT_W-1:0] load_out_data,
  // Reed-Solomon coder pins
  output rs_in_t               rs_in,
  input  rs_out_t              rs_out,
  output logic                 dut_clk_en,
  // to the transactor
  output logic                 result,
  output logic [ADDR_W-1:0]    vec,
  output logic                 in_ok,
  output logic                 out_val,
  output logic                 match,
  output logic [ADDR_W-1:0]    n_mismatch
);

  logic [ADDR_W-1:0]    count;
  logic                 start;
  logic                 readwr;
  logic [TVM_IN_W-1:0]  data_bits;
  logic [TVM_OUT_W-1:0] out_vector;

  vector_counter #(.ADDR_W(ADDR_W), .NUM_VECTORS(NUM_VECTORS)) u_counter (
    .clk, .rst, .clk_en, .init,
    .count, .vec, .start, .in_ok, .out_val
  );

  assign readwr = in_ok;

  tvm #(.ADDR_W(ADDR_W), .WIDTH(TVM_IN_W)) u_input_tvm (
    .clk, .readwr, .address(count), .data_out(data_bits),
    .load(load_in), .load_addr, .load_data(load_in_data)
  );

  tvm #(.ADDR_W(ADDR_W), .WIDTH(TVM_OUT_W)) u_output_tvm (
    .clk, .readwr, .address(count), .data_out(out_vector),
    .load(load_out), .load_addr, .load_data(load_out_data)
  );

  assign rs_in      = rs_in_t'(data_bits);
  assign dut_clk_en = clk_en && in_ok;

  result_checker #(.WIDTH(TVM_OUT_W), .COUNT_W(ADDR_W)) u_checker (
    .clk, .rst, .clk_en,
    .clear(start), .check(in_ok),
    .dut_out(rs_out), .expected(out_vector),
    .match, .result, .mismatches(n_mismatch)
  );

endmodule
