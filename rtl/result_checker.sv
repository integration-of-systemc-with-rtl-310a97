// result_checker - comparator and cumulative pass/fail register.
//
// In every enabled cycle (clk_en) in which `check` is high, the DUT output
// word is compared bit for bit with the expected word read from the output
// TVM, and the result is ANDed into the pass/fail flip-flop, so `result`
// stays 1 only while every compared vector has matched. `clear` (sampled on
// an enabled edge) sets the flip-flop back to 1 for a new run. `match` is
// the comparison of the current cycle, for observation. `mismatches`
// counts failing vectors; it is this design's addition and is not sent to
// the host. Reset is synchronous, active high, and sets `result` to 1.
module result_checker #(
  parameter int unsigned WIDTH   = 22,
  parameter int unsigned COUNT_W = 19
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               clk_en,
  input  logic               clear,
  input  logic               check,
  input  logic [WIDTH-1:0]   dut_out,
  input  logic [WIDTH-1:0]   expected,
  output logic               match,
  output logic               result,
  output logic [COUNT_W-1:0] mismatches
);

  logic               result_q;
  logic [COUNT_W-1:0] mism_q;

  assign match = (dut_out == expected);

  always_ff @(posedge clk) begin
    if (rst) begin
      result_q <= 1'b1;
      mism_q   <= '0;
    end else if (clk_en) begin
      if (clear) begin
        result_q <= 1'b1;
        mism_q   <= '0;
      end else if (check) begin
        result_q <= result_q & match;
        if (!match) mism_q <= mism_q + 1'b1;
      end
    end
  end

  assign result     = result_q;
  assign mismatches = mism_q;

endmodule
