// vector_counter - TVM address counter with the IN_OK / OUT_VAL
// synchronisation signals.
//
// Idle after reset with IN_OK = 0 and OUT_VAL = 0. An enabled clock edge
// (clk_en high) that sees `init` (the initiate_test bit from the host)
// clears the address to 0 and raises IN_OK. While IN_OK is high the address
// advances by one on every enabled edge, so vector k is applied during the
// k-th enabled cycle after the start. The edge that leaves the last valid
// address (NUM_VECTORS-1) inverts the two signals: IN_OK = 0, OUT_VAL = 1,
// and `vec` then holds the number of vectors applied. A further `init`
// seen on an enabled edge starts a new run.
//
// `start` is high in the cycle in which the next enabled edge begins a run
// (the checker clears its result then); `running` equals IN_OK.
// The run-start on `init` is this design's choice (the source's counter
// restarts on the first clock of a session). Reset is synchronous, active
// high.
module vector_counter #(
  parameter int unsigned ADDR_W      = 19,
  parameter int unsigned NUM_VECTORS = 275262
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clk_en,
  input  logic              init,
  output logic [ADDR_W-1:0] count,
  output logic [ADDR_W-1:0] vec,
  output logic              start,
  output logic              in_ok,
  output logic              out_val
);

  localparam logic [ADDR_W-1:0] LAST = ADDR_W'(NUM_VECTORS - 1);

  initial assert (NUM_VECTORS >= 1 && NUM_VECTORS <= 2 ** ADDR_W)
    else $error("NUM_VECTORS must fit in the address range");

  logic [ADDR_W-1:0] count_q;
  logic              in_ok_q, out_val_q;

  assign start = !in_ok_q && init;

  always_ff @(posedge clk) begin
    if (rst) begin
      count_q   <= '0;
      in_ok_q   <= 1'b0;
      out_val_q <= 1'b0;
    end else if (clk_en) begin
      if (start) begin
        count_q   <= '0;
        in_ok_q   <= 1'b1;
        out_val_q <= 1'b0;
      end else if (in_ok_q) begin
        count_q <= count_q + 1'b1;
        if (count_q == LAST) begin
          in_ok_q   <= 1'b0;
          out_val_q <= 1'b1;
        end
      end
    end
  end

  assign count   = count_q;
  assign in_ok   = in_ok_q;
  assign out_val = out_val_q;
  // count_q wraps to zero when NUM_VECTORS fills the whole address range
  assign vec     = out_val_q ? ADDR_W'(NUM_VECTORS) : '0;

endmodule
