// tb_result_checker - cumulative pass/fail: a run of matching words keeps
// result at 1; one mismatching word drops it to 0 for the rest of the run;
// words with check low or clk_en low are ignored; clear restores 1. The
// mismatch count and per-cycle match are checked against a model.
module tb_result_checker;
  localparam int W = 22;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst, clk_en, clear, check, match, result;
  logic [W-1:0]  dut_out, expected;
  logic [18:0]   mismatches;

  result_checker #(.WIDTH(W), .COUNT_W(19)) dut (.*);

  int checks = 0, failures = 0;
  bit m_result;
  int m_mism;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst = 1'b1; clk_en = 1'b0; clear = 1'b0; check = 1'b0; dut_out = '0; expected = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    m_result = 1; m_mism = 0;
    for (int run = 0; run < 6; run++) begin
      clk_en = 1'b1; clear = 1'b1;
      @(negedge clk);
      clear = 1'b0; m_result = 1; m_mism = 0;
      chk(result == 1'b1 && mismatches == 0, "clear did not restore pass");
      for (int i = 0; i < 100; i++) begin
        bit bad;
        clk_en   = ($urandom % 4) != 0;
        check    = ($urandom % 5) != 0;
        expected = W'($urandom);
        // run 0 and 3 never mismatch; others mismatch rarely
        bad      = (run % 3 != 0) && (($urandom % 40) == 0);
        dut_out  = bad ? expected ^ W'(1 << ($urandom % W)) : expected;
        #1;
        chk(match == !bad, "match flag wrong");
        if (clk_en && check && bad) begin m_result = 0; m_mism++; end
        @(negedge clk);
        chk(result == m_result, $sformatf("run %0d step %0d: result %0b expected %0b", run, i, result, m_result));
        chk(mismatches == 19'(m_mism), "mismatch count wrong");
      end
    end
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
