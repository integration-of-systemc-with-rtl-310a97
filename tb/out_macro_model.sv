// out_macro_model - behavioural model of the channel's output co-modeling
// macro, for testbenches only.
//
// On a rising clock edge at which newdata is high and datadone low, the
// macro copies `data` into its output register (appending it to the list
// `got` that the host side reads) and raises datadone. It lowers datadone
// on the first edge at which newdata is low again. With `stall` high it
// holds off, as a busy channel would.
module out_macro_model #(
  parameter int unsigned W = 22
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         newdata,
  output logic         datadone,
  input  logic [W-1:0] data,
  input  logic         stall
);

  logic [W-1:0] got [$];

  initial datadone = 1'b0;

  always @(posedge clk) begin
    if (rst) begin
      datadone <= 1'b0;
    end else if (newdata && !datadone && !stall) begin
      got.push_back(data);
      datadone <= 1'b1;
    end else if (datadone && !newdata) begin
      datadone <= 1'b0;
    end
  end

endmodule
