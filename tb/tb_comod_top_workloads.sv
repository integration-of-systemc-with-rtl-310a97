// tb_comod_top_workloads - stored-test-set runs at the test-set sizes
// T1..T5 (61714, 68066, 128270, 170594 and 179804 vectors).
//
// Five copies of the top level, each built with NUM_VECTORS set to one test
// set size and the default TVM depth of 2**19 words, run side by side on one
// clock (workload_run). Each must return a single pass reply carrying its
// own vector count after about that many enabled cycles. The largest set
// (275262 vectors, the default) is run by tb_comod_top_full.
module tb_comod_top_workloads;
  localparam int unsigned SIZES [5] = '{61714, 68066, 128270, 170594, 179804};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done [5];
  int   nc   [5];
  int   nf   [5];

  for (genvar i = 0; i < 5; i++) begin : g_run
    workload_run #(.N(SIZES[i])) u_run (.clk, .done(done[i]), .n_checks(nc[i]), .n_failures(nf[i]));
  end

  int checks = 0, failures = 0;

  initial begin
    @(posedge clk);
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    for (int i = 0; i < 5; i++) begin
      checks += nc[i];
      failures += nf[i];
      $display("T%0d: %0d vectors, %0d checks, %0d failures", i + 1, SIZES[i], nc[i], nf[i]);
    end
    if (checks != 25) begin
      failures++;
      $display("FAIL: %0d checks ran, expected 25", checks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
