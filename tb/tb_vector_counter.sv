// tb_vector_counter - address counter and IN_OK / OUT_VAL: after init the
// address must step 0,1,..,N-1 on enabled edges only (random clock-enable
// gaps), IN_OK must be high for exactly N enabled edges, then IN_OK = 0,
// OUT_VAL = 1 and vec = N. A second init restarts the sweep. N = 37.
module tb_vector_counter;
  localparam int ADDR_W = 8;
  localparam int N      = 37;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst, clk_en, init, start, in_ok, out_val;
  logic [ADDR_W-1:0] count, vec;

  vector_counter #(.ADDR_W(ADDR_W), .NUM_VECTORS(N)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_once(input int gap_pct);
    int k;
    @(negedge clk);
    init = 1'b1; clk_en = 1'b1;
    #1;
    check(start, "start not flagged with init while idle");
    @(negedge clk);
    init = 1'b0;
    k = 0;
    while (k < N) begin
      clk_en = ($urandom % 100) >= gap_pct;
      check(in_ok && !out_val, $sformatf("IN_OK/OUT_VAL wrong during run at %0d", k));
      check(count == ADDR_W'(k), $sformatf("address %0d, expected %0d", count, k));
      if (clk_en) k++;
      @(negedge clk);
    end
    check(!in_ok && out_val, "IN_OK/OUT_VAL not inverted after the last address");
    check(vec == ADDR_W'(N), $sformatf("vec = %0d, expected %0d", vec, N));
    clk_en = 1'b1;
    repeat (3) @(negedge clk);
    check(!in_ok && out_val, "run restarted without init");
  endtask

  initial begin
    rst = 1'b1; clk_en = 1'b0; init = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check(!in_ok && !out_val && vec == 0, "not idle after reset");
    @(negedge clk); clk_en = 1'b1;
    repeat (3) @(negedge clk);
    check(!in_ok && count == 0, "counting without init");
    run_once(0);
    run_once(30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
