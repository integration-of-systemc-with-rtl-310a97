// tb_comod_top - end-to-end test of the emulator-side design.
//
// Testbench on the emulator: the TVMs of a reduced top (N = 300 vectors,
// 10 address bits) are loaded with random stimuli and the responses of the
// core stand-in. The host side sends one word with initiate_test = 1 through
// the input macro model and must get back exactly one word,
// {2'b00, pass, vec} = {.., 1, N}; a second run with one corrupted expected
// word must report fail. Each run must take N cycles of IN_OK clocking and
// use exactly two channel transactions.
// Concatenated coding: two random codewords go through the interleaver,
// the 2-bit words are looped back (the convolutional code and channel are
// not part of this RTL) into the de-interleaver, and the same codewords must
// come out. Coder memory: random writes and reads through the memory
// wrapper. Mechanisms counted and required at least once: transactor
// waiting in TXWAIT for the result, clock kept running by IN_OK, output
// request held back by OUT_VAL, pass result, fail result, restart by a new
// initiate_test, interleaver and de-interleaver back-pressure, a full
// interleaver refusing data, memory write, memory read.
module tb_comod_top;
  import comod_pkg::*;
  import rs_model_pkg::*;

  localparam int ADDR_W = 10;
  localparam int N      = 300;

  logic clk = 1'b0, rst = 1'b1, core_rst = 1'b1;
  always #5 clk = ~clk;

  // channel
  logic                 in_avail, in_done, out_avail, out_done;
  logic [IN_VEC_W-1:0]  in_data;
  logic [OUT_VEC_W-1:0] out_data;
  xact_state_e          xact_state;
  // TVM load
  logic                 load_in = 0, load_out = 0;
  logic [ADDR_W-1:0]    load_addr = '0;
  logic [TVM_IN_W-1:0]  load_in_data = '0;
  logic [TVM_OUT_W-1:0] load_out_data = '0;
  // core
  rs_in_t               rs_in;
  rs_out_t              rs_out;
  logic                 dut_clk_en, in_ok, out_val, result, match;
  logic [ADDR_W-1:0]    n_mismatch;
  // interleaving
  logic [7:0] il_in_data = '0;  logic il_in_req = 0, il_in_ack, il_in_ctrl_req = 0, il_in_ctrl_ack;
  logic [1:0] il_out_data;      logic il_out_req, il_out_ack, il_out_ctrl_req, il_out_ctrl_ack;
  logic [1:0] dil_in_data;      logic dil_in_req, dil_in_ack, dil_in_ctrl_req, dil_in_ctrl_ack;
  logic [7:0] dil_out_data;     logic dil_out_req, dil_out_ack = 0, dil_out_ctrl_req, dil_out_ctrl_ack = 0;
  logic       vit_stall = 0;
  // memory
  logic       mem_ez = 1, mem_wz = 1;
  logic [6:0] mem_a = '0;
  logic [7:0] mem_d = '0, mem_q;

  in_macro_model  #(.W(IN_VEC_W))  u_in  (.clk, .rst, .newdata(in_avail), .datadone(in_done), .data(in_data), .stall(1'b0));
  out_macro_model #(.W(OUT_VEC_W)) u_out (.clk, .rst, .newdata(out_avail), .datadone(out_done), .data(out_data), .stall(1'b0));
  rs_coder_model  u_core (.clk, .clk_en(dut_clk_en), .rst(core_rst), .rs_in, .rs_out);

  // stand-in for the convolutional encoder / channel / decoder: a loop-back
  // that can stall
  assign dil_in_data     = il_out_data;
  assign dil_in_req      = il_out_req && !vit_stall;
  assign il_out_ack      = dil_in_ack && !vit_stall;
  assign dil_in_ctrl_req = il_out_ctrl_req;
  assign il_out_ctrl_ack = dil_in_ctrl_ack;

  comod_top #(.ADDR_W(ADDR_W), .NUM_VECTORS(N)) dut (.*);

  int checks = 0, failures = 0;
  int m_txwait = 0, m_inok = 0, m_gated = 0, m_pass = 0, m_fail = 0, m_restart = 0;
  int m_il_stall = 0, m_dil_stall = 0, m_il_full = 0, m_mem_wr = 0, m_mem_rd = 0;
  int n_core;

  always @(posedge clk) begin
    if (!rst) begin
      if (xact_state == XS_TXWAIT) m_txwait++;
      if (in_ok && !dut.xact_enable) m_inok++;
      if (dut.xact_out_avail && !out_val) m_gated++;
      if (il_out_req && !il_out_ack) m_il_stall++;
      if (dil_out_req && !dil_out_ack) m_dil_stall++;
      if (dut.u_interleaver.full_q && !il_in_ack) m_il_full++;
      if (dut_clk_en) n_core++;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [TVM_IN_W-1:0]  stim [N];
  logic [TVM_OUT_W-1:0] resp [N];

  task automatic test_run(input bit exp_pass, input int run_no);
    int n_prev;
    longint t0;
    @(negedge clk); core_rst = 1'b1;
    @(negedge clk); core_rst = 1'b0;
    n_prev = u_out.got.size();
    n_core = 0;
    t0 = $time;
    u_in.send(IN_VEC_W'(1));
    wait (u_out.got.size() == n_prev + 1);
    repeat (5) @(negedge clk);
    chk(u_out.got.size() == n_prev + 1, "more than one result word");
    chk(u_out.got[n_prev] == {2'b00, exp_pass, ADDR_W'(N)} ,
        $sformatf("run %0d: reply %h, expected pass=%0b vec=%0d", run_no, u_out.got[n_prev], exp_pass, N));
    chk(n_core == N, $sformatf("core clocked %0d times, expected %0d", n_core, N));
    chk(u_in.loaded == run_no, "input transactions not one per run");
    chk(($time - t0) / 10 <= N + 10, $sformatf("run took %0d cycles for %0d vectors", ($time - t0) / 10, N));
    if (u_out.got[n_prev][ADDR_W]) m_pass++; else m_fail++;
    if (run_no > 1) m_restart++;
    chk(xact_state == XS_IDLE, "transactor not idle after the run");
  endtask

  // --- interleaving ---------------------------------------------------
  logic [7:0] cw [2][128];
  int got_sym;
  bit il_done = 0;

  initial begin : interleaving
    wait (!rst);
    for (int blk = 0; blk < 2; blk++) begin
      for (int r = 0; r < 2; r++) for (int c = 0; c < 128; c++) cw[r][c] = 8'($urandom);
      fork
        begin
          for (int r = 0; r < 2; r++) for (int c = 0; c < 128; c++) begin
            @(negedge clk); il_in_req = 1; il_in_data = cw[r][c];
            @(posedge clk); while (!il_in_ack) @(posedge clk);
          end
          @(negedge clk); il_in_req = 0;
          repeat (2) @(negedge clk);
          il_in_ctrl_req = 1;
          @(posedge clk); while (!il_in_ctrl_ack) @(posedge clk);
          @(negedge clk); il_in_ctrl_req = 0;
        end
        begin
          got_sym = 0;
          while (got_sym < 256) begin
            @(negedge clk);
            dil_out_ack = ($urandom % 3) != 0;
            vit_stall   = ($urandom % 4) == 0;
            @(posedge clk);
            if (dil_out_req && dil_out_ack) begin
              chk(dil_out_data == cw[got_sym / 128][got_sym % 128],
                  $sformatf("block %0d symbol %0d = %h, expected %h", blk, got_sym, dil_out_data, cw[got_sym / 128][got_sym % 128]));
              got_sym++;
            end
          end
          @(negedge clk); dil_out_ack = 0; vit_stall = 0; dil_out_ctrl_ack = 1;
          @(posedge clk); while (!dil_out_ctrl_req) @(posedge clk);
          @(negedge clk); dil_out_ctrl_ack = 0;
        end
      join
    end
    il_done = 1;
  end

  initial begin
    logic [15:0] acc;
    logic [7:0]  mem_model [128];
    logic [7:0]  q_exp;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    acc = 16'h1d0f;
    for (int k = 0; k < N; k++) begin
      stim[k] = TVM_IN_W'({$urandom, $urandom});
      resp[k] = outputs(acc, rs_in_t'(stim[k]));
      acc     = next_acc(acc, rs_in_t'(stim[k]));
    end
    for (int k = 0; k < N; k++) begin
      load_in = 1; load_out = 1; load_addr = ADDR_W'(k);
      load_in_data = stim[k]; load_out_data = resp[k];
      @(negedge clk);
    end
    load_in = 0; load_out = 0;
    test_run(1'b1, 1);
    load_out = 1; load_addr = ADDR_W'(17); load_out_data = resp[17] ^ 22'h200000;
    @(negedge clk); load_out = 0;
    test_run(1'b0, 2);
    load_out = 1; load_addr = ADDR_W'(17); load_out_data = resp[17];
    @(negedge clk); load_out = 0;
    test_run(1'b1, 3);
    // coder memory
    for (int a = 0; a < 128; a++) begin
      mem_ez = 0; mem_wz = 0; mem_a = 7'(a); mem_d = 8'($urandom); mem_model[a] = mem_d;
      @(negedge clk); m_mem_wr++;
    end
    for (int i = 0; i < 300; i++) begin
      mem_a = 7'($urandom);
      if ($urandom % 2) begin mem_wz = 0; mem_d = 8'($urandom); mem_model[mem_a] = mem_d; q_exp = mem_d; m_mem_wr++; end
      else begin mem_wz = 1; q_exp = mem_model[mem_a]; m_mem_rd++; end
      mem_ez = 0;
      @(negedge clk);
      chk(mem_q == q_exp, $sformatf("coder memory Q=%h expected %h", mem_q, q_exp));
    end
    mem_ez = 1;
    wait (il_done);
    repeat (20) @(negedge clk);
    $display("txwait=%0d inok=%0d gated=%0d pass=%0d fail=%0d restart=%0d il_stall=%0d dil_stall=%0d il_full=%0d mem_wr=%0d mem_rd=%0d",
             m_txwait, m_inok, m_gated, m_pass, m_fail, m_restart, m_il_stall, m_dil_stall, m_il_full, m_mem_wr, m_mem_rd);
    chk(m_txwait > 0, "TXWAIT never used");
    chk(m_inok > 0, "IN_OK never kept the clock running");
    chk(m_gated > 0, "OUT_VAL never held back the output request");
    chk(m_pass == 2, "pass result not seen twice");
    chk(m_fail == 1, "fail result not seen");
    chk(m_restart == 2, "restart not seen");
    chk(m_il_stall > 0, "interleaver never stalled");
    chk(m_dil_stall > 0, "de-interleaver never stalled");
    chk(m_il_full > 0, "full interleaver never refused data");
    chk(m_mem_wr > 0 && m_mem_rd > 0, "memory not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
