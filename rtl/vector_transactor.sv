// vector_transactor - two-edge data-streaming RTL transactor.
//
// Sits between the input and output co-modeling macros of the emulator
// channel and the clock control of the design under test (DUT). One
// transaction moves one input vector into the DUT, clocks the DUT once and
// hands one output vector back to the host.
//
// State machine (four states, transitions as in the vendor's diagram):
//   IDLE    -> ACTIVE   at posedge clk if in_avail && !out_done
//   ACTIVE  -> IDLE     at negedge clk if !in_avail && out_done
//   ACTIVE  -> RCVWAIT  at negedge clk if out_done   (transmit finished)
//   ACTIVE  -> TXWAIT   at negedge clk if !in_avail  (receive finished)
//   RCVWAIT -> IDLE     at negedge clk if !in_avail
//   TXWAIT  -> IDLE     at negedge clk if out_done
// The posedge transition is held in a toggle pair (start_tgl_q written only
// on posedge, ack_tgl_q only on negedge) so that no register is written on
// both edges; a differing pair means "entered ACTIVE since the last negedge".
//
// Outputs (this design's choice, the source gives only the transitions):
//   in_done   - datadone to the input macro; high while a receive is
//               outstanding (ACTIVE, RCVWAIT). The macro drops in_avail.
//   out_avail - newdata to the output macro; high while a transmit is
//               outstanding (ACTIVE, TXWAIT). The macro raises out_done.
//   enable    - the DUT clock enable: high exactly when the coming posedge
//               starts a transaction, so the DUT is clocked once, on that
//               edge, with the freshly received input vector. The output
//               vector offered during the transaction is the DUT output
//               after that edge, and stays valid however long the output
//               macro takes, since the DUT is not clocked again before IDLE.
// Reset (rst, from the reset macro) is synchronous and active high: it is
// sampled on both clock edges and returns the transactor to IDLE.
module vector_transactor
  import comod_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_avail,
  output logic in_done,
  output logic out_avail,
  input  logic out_done,
  output logic enable,
  output xact_state_e state
);

  xact_state_e state_q;       // written on negedge
  logic        start_tgl_q;   // written on posedge
  logic        ack_tgl_q;     // written on negedge
  logic        start;

  assign state = (start_tgl_q != ack_tgl_q) ? XS_ACTIVE : state_q;
  assign start = (state == XS_IDLE) && in_avail && !out_done;

  // Positive edge: start a transaction
  always_ff @(posedge clk) begin
    if (rst) begin
      start_tgl_q <= 1'b0;
    end else if (start) begin
      start_tgl_q <= ~start_tgl_q;
    end
  end

  // Negative edge: receive / transmit acknowledgement
  always_ff @(negedge clk) begin
    if (rst) begin
      state_q   <= XS_IDLE;
      ack_tgl_q <= 1'b0;
    end else begin
      ack_tgl_q <= start_tgl_q;
      unique case (state)
        XS_ACTIVE: begin
          if (!in_avail && out_done) state_q <= XS_IDLE;
          else if (out_done)         state_q <= XS_RCVWAIT;
          else if (!in_avail)        state_q <= XS_TXWAIT;
          else                       state_q <= XS_ACTIVE;
        end
        XS_RCVWAIT: if (!in_avail) state_q <= XS_IDLE;
        XS_TXWAIT:  if (out_done)  state_q <= XS_IDLE;
        default:    state_q <= XS_IDLE;
      endcase
    end
  end

  assign in_done   = (state == XS_ACTIVE) || (state == XS_RCVWAIT);
  assign out_avail = (state == XS_ACTIVE) || (state == XS_TXWAIT);
  assign enable    = start;

endmodule
