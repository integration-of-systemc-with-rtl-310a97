// tb_deinterleaver - de-interleaver over full-handshake links.
//
// Two random 128-symbol codewords are interleaved in software (word n =
// {row1[l][k], row0[l][k]}, l = n/8, k = 7 - n%8) and the 1024 words are
// sent in with random gaps, followed by the control word. The 256 symbols
// that come out, read with random acknowledge gaps, must be codeword 0 then
// codeword 1 in their original order, followed by a control word. Once 1024
// words are stored, no further word may be acknowledged; a gap-free block must come out in 256
// consecutive cycles.
module tb_deinterleaver;
  localparam int ROWS = 2, COLS = 128, SYM_W = 8;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  ms_full_if #(.W(ROWS))  vit_data (.clk, .rst);
  ms_full_if #(.W(1))     vit_ctrl (.clk, .rst);
  ms_full_if #(.W(SYM_W)) rs_data  (.clk, .rst);
  ms_full_if #(.W(1))     rs_ctrl  (.clk, .rst);

  deinterleaver #(.ROWS(ROWS), .COLS(COLS), .SYM_W(SYM_W)) dut (.clk, .rst, .vit_data, .vit_ctrl, .rs_data, .rs_ctrl);

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
    for (int n = 0; n < COLS * SYM_W; n++) begin
      int l, k;
      l = n / SYM_W; k = SYM_W - 1 - (n % SYM_W);
      while (($urandom % 100) < gap_pct) @(negedge clk);
      vit_data.req = 1'b1; vit_data.data = {cw[1][l][k], cw[0][l][k]};
      @(posedge clk);
      while (!vit_data.ack) @(posedge clk);
      @(negedge clk);
      vit_data.req = 1'b0;
    end
    if (try_overflow) begin
      // the block is full: no further word may be acknowledged
      repeat (3) begin
        @(posedge clk);
        if (!vit_data.ack) n_overflow_blocked++;
      end
      @(negedge clk);
    end
    vit_ctrl.req = 1'b1;
    @(posedge clk);
    while (!vit_ctrl.ack) @(posedge clk);
    @(negedge clk);
    vit_ctrl.req = 1'b0;
  endtask

  task automatic receive_block(input int gap_pct, output int cycles);
    int n = 0;
    cycles = 0;
    while (n < ROWS * COLS) begin
      rs_data.ack = ($urandom % 100) >= gap_pct;
      @(posedge clk);
      cycles++;
      if (rs_data.req && rs_data.ack) begin
        chk(rs_data.data == cw[n / COLS][n % COLS],
            $sformatf("symbol %0d = %h, expected %h", n, rs_data.data, cw[n / COLS][n % COLS]));
        n++;
      end
      @(negedge clk);
    end
    rs_data.ack = 1'b0;
    rs_ctrl.ack = 1'b1;
    @(posedge clk);
    chk(rs_ctrl.req && rs_ctrl.data == 1'b1, "no control word after the block");
    @(negedge clk);
    rs_ctrl.ack = 1'b0;
  endtask

  initial begin
    int cycles;
    vit_data.req = 0; vit_data.data = '0; vit_ctrl.req = 0; vit_ctrl.data = 1'b1;
    rs_data.ack = 0; rs_ctrl.ack = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int b = 0; b < 2; b++) begin
      send_block(30, b == 0);
      receive_block(30, cycles);
    end
    chk(n_overflow_blocked == 3, "a word beyond a full block was acknowledged");
    send_block(0, 0);
    receive_block(0, cycles);
    chk(cycles == ROWS * COLS, $sformatf("block streamed in %0d cycles, expected %0d", cycles, ROWS * COLS));
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
