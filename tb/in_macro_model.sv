// in_macro_model - behavioural model of the channel's input co-modeling
// macro, for testbenches only.
//
// Words given to `send` (a task) wait in a queue, as they would in the
// channel buffer. The macro loads the next word into its data register and
// raises newdata on a rising clock edge when newdata and datadone are both
// low; it drops newdata on the edge at which it sees datadone high, and
// does not raise it again before datadone has fallen. With `stall` high it
// is slow to drop newdata.
module in_macro_model #(
  parameter int unsigned W = 33
) (
  input  logic         clk,
  input  logic         rst,
  output logic         newdata,
  input  logic         datadone,
  output logic [W-1:0] data,
  input  logic         stall
);

  logic [W-1:0] fifo [$];
  int unsigned  loaded = 0;

  task automatic send(input logic [W-1:0] word);
    fifo.push_back(word);
  endtask

  function automatic int unsigned pending();
    return fifo.size();
  endfunction

  initial begin
    newdata = 1'b0;
    data    = '0;
  end

  always @(posedge clk) begin
    if (rst) begin
      newdata <= 1'b0;
    end else if (newdata && datadone && !stall) begin
      newdata <= 1'b0;
    end else if (!newdata && !datadone && fifo.size() > 0) begin
      data    <= fifo.pop_front();
      newdata <= 1'b1;
      loaded  <= loaded + 1;
    end
  end

endmodule
