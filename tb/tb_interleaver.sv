// tb_interleaver - block interleaver over full-handshake links.
//
// Two blocks of two random 128-symbol codewords are sent in with random
// request gaps, followed by the control word; the 1024 two-bit output words,
// read with random acknowledge gaps, must be {row1[l][k], row0[l][k]} for
// l = 0..127 and k = 7..0, followed by a control word. Once 256 symbols
// are stored, no further symbol may be acknowledged. A third block, with no gaps, must stream its 1024
// words in 1024 consecutive cycles.
module tb_interleaver;
  localparam int ROWS = 2, COLS = 128, SYM_W = 8;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  ms_full_if #(.W(SYM_W)) rs_data  (.clk, .rst);
  ms_full_if #(.W(1))     rs_ctrl  (.clk, .rst);
  ms_full_if #(.W(ROWS))  vit_data (.clk, .rst);
  ms_full_if #(.W(1))     vit_ctrl (.clk, .rst);

  interleaver #(.ROWS(ROWS), .COLS(COLS), .SYM_W(SYM_W)) dut (.clk, .rst, .rs_data, .rs_ctrl, .vit_data, .vit_ctrl);

  int checks = 0, failures = 0;
  logic [SYM_W-1:0] cw [ROWS][COLS];
  int n_overflow_blocked = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_block(input int gap_pct, input bit try_overflow);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) cw[r][c] = SYM_W'($urandom);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        while (($urandom % 100) < gap_pct) @(negedge clk);
        rs_data.req = 1'b1; rs_data.data = cw[r][c];
        @(posedge clk);
        while (!rs_data.ack) @(posedge clk);
        @(negedge clk);
        rs_data.req = 1'b0;
      end
    if (try_overflow) begin
      // the block is full: no further word may be acknowledged
      repeat (3) begin
        @(posedge clk);
        if (!rs_data.ack) n_overflow_blocked++;
      end
      @(negedge clk);
    end
    rs_ctrl.req = 1'b1;
    @(posedge clk);
    while (!rs_ctrl.ack) @(posedge clk);
    @(negedge clk);
    rs_ctrl.req = 1'b0;
  endtask

  task automatic receive_block(input int gap_pct, output int cycles);
    int n = 0;
    cycles = 0;
    while (n < COLS * SYM_W) begin
      vit_data.ack = ($urandom % 100) >= gap_pct;
      @(posedge clk);
      cycles++;
      if (vit_data.req && vit_data.ack) begin
        int l, k;
        l = n / SYM_W; k = SYM_W - 1 - (n % SYM_W);
        chk(vit_data.data == {cw[1][l][k], cw[0][l][k]},
            $sformatf("word %0d = %b, expected %b", n, vit_data.data, {cw[1][l][k], cw[0][l][k]}));
        n++;
      end
      @(negedge clk);
    end
    vit_data.ack = 1'b0;
    vit_ctrl.ack = 1'b1;
    @(posedge clk);
    chk(vit_ctrl.req && vit_ctrl.data == 1'b1, "no control word after the block");
    @(negedge clk);
    vit_ctrl.ack = 1'b0;
  endtask

  initial begin
    int cycles;
    rs_data.req = 0; rs_data.data = '0; rs_ctrl.req = 0; rs_ctrl.data = 1'b1;
    vit_data.ack = 0; vit_ctrl.ack = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int b = 0; b < 2; b++) begin
      send_block(30, b == 0);
      receive_block(30, cycles);
    end
    chk(n_overflow_blocked == 3, "a symbol beyond a full block was acknowledged");
    send_block(0, 0);
    receive_block(0, cycles);
    chk(cycles == COLS * SYM_W, $sformatf("block streamed in %0d cycles, expected %0d", cycles, COLS * SYM_W));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
