// tb_comod_top_full - one complete test-set run on the top level at its
// default size: 275262 vectors in TVMs of 2**19 words.
//
// Stimuli are random, expected responses are computed with the core
// stand-in's functions; one initiate_test word is sent through the input
// macro model and the single reply must be {2'b00, pass = 1, vec = 275262},
// with the core clocked exactly 275262 times. The interleaver, de-interleaver
// and coder memory ports are held idle.
module tb_comod_top_full;
  import comod_pkg::*;
  import rs_model_pkg::*;

  localparam int ADDR_W = TVM_ADDR_W;
  localparam int N      = TVM_NUM_VECTORS;

  logic clk = 1'b0, rst = 1'b1, core_rst = 1'b1;
  always #5 clk = ~clk;

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
  rs_coder_model  u_core (.clk, .clk_en(dut_clk_en), .rst(core_rst), .rs_in, .rs_out);

  comod_top dut (.*);

  int checks = 0, failures = 0;
  int n_core = 0;
  always @(posedge clk) if (!rst && dut_clk_en) n_core++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [15:0]          acc;
    logic [TVM_IN_W-1:0]  s;
    repeat (3) @(negedge clk);
    rst = 1'b0; core_rst = 1'b0;
    acc = 16'h1d0f;
    for (int k = 0; k < N; k++) begin
      s = TVM_IN_W'({$urandom, $urandom});
      load_in = 1; load_out = 1; load_addr = ADDR_W'(k);
      load_in_data = s; load_out_data = outputs(acc, rs_in_t'(s));
      acc = next_acc(acc, rs_in_t'(s));
      @(negedge clk);
    end
    load_in = 0; load_out = 0;
    u_in.send(IN_VEC_W'(1));
    wait (u_out.got.size() == 1);
    repeat (5) @(negedge clk);
    chk(u_out.got.size() == 1, "more than one result word");
    chk(u_out.got[0] == {2'b00, 1'b1, ADDR_W'(N)},
        $sformatf("reply %h, expected pass with vec=%0d", u_out.got[0], N));
    chk(n_core == N, $sformatf("core clocked %0d times, expected %0d", n_core, N));
    chk(n_mismatch == 0, "mismatches reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
