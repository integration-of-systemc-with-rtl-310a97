// tb_vector_transactor - streaming test of the vector transactor.
//
// Input and output macro models sit on both sides, and a small stand-in
// DUT (an accumulator clocked with the transactor's enable) on the data
// path, as in the data-streaming arrangement: the input macro's data
// register drives the DUT, the DUT output drives the output macro. Each of
// NTX random words must come back as the sum of all words up to and
// including it (the DUT output after its one clock edge), the DUT must be clocked once
// per transaction, and a transaction without stalls must take three clock
// cycles from one start to the next. Stalls on either macro force the
// TXWAIT and RCVWAIT states, which must each be visited.
module tb_vector_transactor;
  import comod_pkg::*;

  localparam int NTX = 200;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic                 in_avail, in_done, out_avail, out_done, enable;
  logic [IN_VEC_W-1:0]  in_data;
  logic [OUT_VEC_W-1:0] dut_out;
  logic                 in_stall = 1'b0, out_stall = 1'b0;
  xact_state_e          state;

  in_macro_model  #(.W(IN_VEC_W))  u_in  (.clk, .rst, .newdata(in_avail), .datadone(in_done), .data(in_data), .stall(in_stall));
  out_macro_model #(.W(OUT_VEC_W)) u_out (.clk, .rst, .newdata(out_avail), .datadone(out_done), .data(dut_out), .stall(out_stall));

  vector_transactor dut (.clk, .rst, .in_avail, .in_done, .out_avail, .out_done, .enable, .state);

  // stand-in DUT, clocked by the controlled clock (enable)
  logic [OUT_VEC_W-1:0] acc;
  always_ff @(posedge clk) begin
    if (rst) acc <= '0;
    else if (enable) acc <= acc + OUT_VEC_W'(in_data);
  end
  assign dut_out = acc;

  int checks = 0, failures = 0;
  int n_enable = 0, n_active = 0, n_rcvwait = 0, n_txwait = 0;
  xact_state_e prev_state;
  longint cyc = 0, start_cyc[$];

  always @(posedge clk) begin
    cyc++;
    if (!rst && enable) n_enable++;
  end
  always @(negedge clk) begin
    if (!rst) begin
      if (state == XS_ACTIVE  && prev_state != XS_ACTIVE)  begin n_active++; start_cyc.push_back(cyc); end
      if (state == XS_RCVWAIT && prev_state != XS_RCVWAIT) n_rcvwait++;
      if (state == XS_TXWAIT  && prev_state != XS_TXWAIT)  n_txwait++;
    end
    prev_state = state;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [IN_VEC_W-1:0] words [NTX];

  initial begin
    logic [OUT_VEC_W-1:0] sum;
    prev_state = XS_IDLE;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // phase 1: no stalls, timing check
    for (int i = 0; i < 20; i++) begin
      words[i] = {$urandom, $urandom} & {IN_VEC_W{1'b1}};
      u_in.send(words[i]);
    end
    wait (u_out.got.size() == 20);
    repeat (4) @(posedge clk);
    for (int i = 1; i < 19; i++)
      check(start_cyc[i] - start_cyc[i-1] == 3,
            $sformatf("transaction %0d started %0d cycles after the previous one, expected 3",
                      i, start_cyc[i] - start_cyc[i-1]));
    check(n_rcvwait == 0 && n_txwait == 0, "wait state entered without a stall");
    // phase 2: random stalls on both macros
    for (int i = 20; i < NTX; i++) begin
      words[i] = {$urandom, $urandom} & {IN_VEC_W{1'b1}};
      u_in.send(words[i]);
    end
    while (u_out.got.size() < NTX) begin
      @(negedge clk);
      in_stall  = ($urandom % 3) == 0;
      out_stall = ($urandom % 3) == 0;
    end
    in_stall = 1'b0; out_stall = 1'b0;
    repeat (6) @(posedge clk);
    sum = '0;
    for (int i = 0; i < NTX; i++) begin
      sum += OUT_VEC_W'(words[i]);
      check(u_out.got[i] == sum,
            $sformatf("output %0d = %h, expected %h", i, u_out.got[i], sum));
    end
    check(n_enable == NTX, $sformatf("DUT clocked %0d times for %0d transactions", n_enable, NTX));
    check(n_active == NTX, $sformatf("ACTIVE entered %0d times", n_active));
    check(n_txwait > 0,  "TXWAIT never visited");
    check(n_rcvwait > 0, "RCVWAIT never visited");
    check(state == XS_IDLE, "not back in IDLE");
    $display("active=%0d txwait=%0d rcvwait=%0d enables=%0d", n_active, n_txwait, n_rcvwait, n_enable);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
