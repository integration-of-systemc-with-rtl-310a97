// tb_top_mem - the test-set wrapper with the core stand-in attached.
//
// N random stimulus words are loaded into the input TVM and the responses
// of the stand-in, worked out in software with the stand-in's functions,
// into the output TVM. Run 1 must end with result = 1 and vec = N, with
// IN_OK high for exactly N cycles and the core clocked exactly N times;
// the pin split of every applied word is checked against the stored word.
// Run 2 uses one corrupted expected word and must end with result = 0 and
// one mismatch.
module tb_top_mem;
  import comod_pkg::*;
  import rs_model_pkg::*;

  localparam int ADDR_W = 10;
  localparam int N      = 300;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 rst, model_rst, kick, clk_en, init;
  logic                 load_in, load_out;
  logic [ADDR_W-1:0]    load_addr;
  logic [TVM_IN_W-1:0]  load_in_data;
  logic [TVM_OUT_W-1:0] load_out_data;
  rs_in_t               rs_in;
  rs_out_t              rs_out;
  logic                 dut_clk_en, result, in_ok, out_val, match;
  logic [ADDR_W-1:0]    vec, n_mismatch;

  assign clk_en = kick || in_ok;   // as the top level does

  top_mem #(.ADDR_W(ADDR_W), .NUM_VECTORS(N)) dut (.*);
  rs_coder_model u_core (.clk, .clk_en(dut_clk_en), .rst(model_rst), .rs_in, .rs_out);

  int checks = 0, failures = 0;
  logic [TVM_IN_W-1:0]  stim [N];
  logic [TVM_OUT_W-1:0] resp [N];
  int n_inok, n_core;

  always @(posedge clk) begin
    if (in_ok) n_inok++;
    if (dut_clk_en) n_core++;
  end

  // pin split of the applied word
  always @(negedge clk) begin
    if (in_ok) begin
      logic [TVM_IN_W-1:0] w;
      w = stim[dut.count];
      checks++;
      if (rs_in.i1 !== w[35] || rs_in.i2 !== w[34:24] || rs_in.i3 !== w[23] ||
          rs_in.i4 !== w[22] || rs_in.i5 !== w[21:17] || rs_in.i6 !== w[16] ||
          rs_in.i7 !== w[15:0]) begin
        failures++;
        $display("FAIL: pin split wrong at address %0d", dut.count);
      end
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input bit exp_result, input int exp_mism);
    @(negedge clk);
    model_rst = 1'b1;
    @(negedge clk);
    model_rst = 1'b0;
    n_inok = 0; n_core = 0;
    init = 1'b1; kick = 1'b1;
    @(negedge clk);
    init = 1'b0; kick = 1'b0;
    wait (out_val);
    @(negedge clk);
    chk(result == exp_result, $sformatf("result %0b, expected %0b", result, exp_result));
    chk(n_mismatch == ADDR_W'(exp_mism), $sformatf("%0d mismatches, expected %0d", n_mismatch, exp_mism));
    chk(vec == ADDR_W'(N), $sformatf("vec %0d, expected %0d", vec, N));
    chk(n_inok == N, $sformatf("IN_OK high for %0d cycles, expected %0d", n_inok, N));
    chk(n_core == N, $sformatf("core clocked %0d times, expected %0d", n_core, N));
    repeat (5) @(negedge clk);
    chk(!in_ok && out_val, "did not stay done");
  endtask

  initial begin
    logic [15:0] acc;
    rst = 1'b1; model_rst = 1'b1; kick = 1'b0; init = 1'b0;
    load_in = 1'b0; load_out = 1'b0; load_addr = '0; load_in_data = '0; load_out_data = '0;
    // vectors and responses
    acc = 16'h1d0f;
    for (int k = 0; k < N; k++) begin
      stim[k] = TVM_IN_W'({$urandom, $urandom});
      resp[k] = outputs(acc, rs_in_t'(stim[k]));
      acc     = next_acc(acc, rs_in_t'(stim[k]));
    end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < N; k++) begin
      load_in = 1'b1; load_out = 1'b1; load_addr = ADDR_W'(k);
      load_in_data = stim[k]; load_out_data = resp[k];
      @(negedge clk);
    end
    load_in = 1'b0; load_out = 1'b0;
    run(1'b1, 0);
    // corrupt one expected response
    load_out = 1'b1; load_addr = ADDR_W'(N / 2); load_out_data = resp[N/2] ^ 22'h000100;
    @(negedge clk);
    load_out = 1'b0;
    run(1'b0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
