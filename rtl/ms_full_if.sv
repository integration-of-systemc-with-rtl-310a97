// ms_full_if - full-handshake master/slave link.
//
// The bus port of a point-to-point link between a master process and a
// slave process, synchronous to one clock: DATA and REQUEST from the master,
// ACKNOWLEDGE from the slave. A word moves on every rising clock edge at
// which req and ack are both high. Once the master raises req it must keep
// req high and data stable until that edge (checked by the assertion
// below); the slave may hold ack high in advance when it can take a word.
// The link is used for both the data bus (W = symbol width) and the control
// bus (W = 1, the word being the "start" command) between modules.
interface ms_full_if #(
  parameter int unsigned W = 8
) (
  input logic clk,
  input logic rst
);

  logic [W-1:0] data;
  logic         req;
  logic         ack;

  modport master (output data, output req, input ack);
  modport slave  (input data, input req, output ack);

  // A request is held, with its data, until it is acknowledged
  property p_req_held;
    @(posedge clk) disable iff (rst)
      (req && !ack) |=> (req && $stable(data));
  endproperty
  a_req_held: assert property (p_req_held)
    else $error("ms_full_if: request withdrawn or data changed before acknowledge");

endinterface
