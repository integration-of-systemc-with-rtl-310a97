// rs_coder_model - stand-in for the Reed-Solomon coder core, for
// testbenches only. It is not a Reed-Solomon coder: it is a small clocked
// circuit with the core's pins whose outputs depend on its inputs and on
// its history, so that a test vector set can be generated for it (see
// rs_model_step) and replayed through the test vector memories.
module rs_coder_model
  import comod_pkg::*;
(
  input  logic    clk,
  input  logic    clk_en,
  input  logic    rst,
  input  rs_in_t  rs_in,
  output rs_out_t rs_out
);
  logic [15:0] acc;

  always_ff @(posedge clk) begin
    if (rst) acc <= 16'h1d0f;
    else if (clk_en) acc <= rs_model_pkg::next_acc(acc, rs_in);
  end

  assign rs_out = rs_model_pkg::outputs(acc, rs_in);
endmodule
