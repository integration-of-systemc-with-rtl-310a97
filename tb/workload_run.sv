// workload_run - one stored-test-set run of comod_top at a given size.
//
// Helper for the workload testbench. It instantiates the top level with
// NUM_VECTORS = N (TVM depth kept at the default 2**19 words), loads N random
// stimulus words and the stand-in core's expected responses, sends one
// initiate_test vector through the input macro model and checks the single
// reply: {2'b00, pass = 1, vec = N}, the core clocked exactly N times, no
// mismatches, and the reply arriving within a few cycles of N enabled
// cycles after the start. `done` rises when the checks are finished; the
// counts are then valid.
module workload_run
  import comod_pkg::*;
  import rs_model_pkg::*;
#(
  parameter int unsigned N = 1000
) (
  input  logic clk,
  output logic done,
  output int   n_checks,
  output int   n_failures
);
  localparam int ADDR_W = TVM_ADDR_W;

  logic rst = 1'b1;
  logic                 in_avail, in_done, out_avail, out_done;
  logic [IN_VEC_W-1:0]  in_data;
  logic [OUT_VEC_W-1:0] out_data;
  xact_state_e          xact_state;
  logic                 load_in = 0, load_out = 0;
  logic [ADDR_W-1:0]    load_addr = '0;
  logic [TVM_IN_W-1:0]  load_in_data = '0;
  logic [TVM_OUT_W-1:0] load_out_data = '0;
  rs_in_t               rs_in;
  rs_out_t              rs_out;
  logic                 dut_clk_en, in_ok, out_val, result, match;
  logic [ADDR_W-1:0]    n_mismatch;
  logic [7:0] il_in_data = '0;  logic il_in_req = 0, il_in_ack, il_in_ctrl_req = 0, il_in_ctrl_ack;
  logic [1:0] il_out_data;      logic il_out_req, il_out_ack = 0, il_out_ctrl_req, il_out_ctrl_ack = 0;
  logic [1:0] dil_in_data = '0; logic dil_in_req = 0, dil_in_ack, dil_in_ctrl_req = 0, dil_in_ctrl_ack;
  logic [7:0] dil_out_data;     logic dil_out_req, dil_out_ack = 0, dil_out_ctrl_req, dil_out_ctrl_ack = 0;
  logic       mem_ez = 1, mem_wz = 1;
  logic [6:0] mem_a = '0;
  logic [7:0] mem_d = '0, mem_q;

  in_macro_model  #(.W(IN_VEC_W))  u_in  (.clk, .rst, .newdata(in_avail), .datadone(in_done), .data(in_data), .stall(1'b0));
  out_macro_model #(.W(OUT_VEC_W)) u_out (.clk, .rst, .newdata(out_avail), .datadone(out_done), .data(out_data), .stall(1'b0));
  rs_coder_model  u_core (.clk, .clk_en(dut_clk_en), .rst, .rs_in, .rs_out);

  comod_top #(.NUM_VECTORS(N)) dut (.*);

  int n_core = 0, n_cycles = 0;
  always @(posedge clk) begin
    if (!rst && dut_clk_en) n_core++;
    if (!rst) n_cycles++;
  end

  task automatic chk(input bit ok, input string what);
    n_checks++;
    if (!ok) begin n_failures++; $display("FAIL (N=%0d): %s", N, what); end
  endtask

  initial begin
    logic [15:0]          acc;
    logic [TVM_IN_W-1:0]  s;
    int                   t0;
    done = 1'b0; n_checks = 0; n_failures = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    acc = 16'h1d0f;
    for (int k = 0; k < int'(N); k++) begin
      s = TVM_IN_W'({$urandom, $urandom});
      load_in = 1; load_out = 1; load_addr = ADDR_W'(k);
      load_in_data = s; load_out_data = outputs(acc, rs_in_t'(s));
      acc = next_acc(acc, rs_in_t'(s));
      @(negedge clk);
    end
    load_in = 0; load_out = 0;
    t0 = n_cycles;
    u_in.send(IN_VEC_W'(1));
    wait (u_out.got.size() == 1);
    chk(n_cycles - t0 <= int'(N) + 8,
        $sformatf("reply after %0d cycles for %0d vectors", n_cycles - t0, N));
    repeat (5) @(negedge clk);
    chk(u_out.got.size() == 1, "more than one result word");
    chk(u_out.got[0] == {2'b00, 1'b1, ADDR_W'(N)},
        $sformatf("reply %h, expected pass with vec=%0d", u_out.got[0], N));
    chk(n_core == int'(N), $sformatf("core clocked %0d times", n_core));
    chk(n_mismatch == 0, "mismatches reported");
    done = 1'b1;
  end
endmodule
