// comod_pkg - shared widths, constants and types for the emulator-side
// co-modeling design.
//
// The numbers below are the ones of the Reed-Solomon coder setup: a 33-bit
// input vector and a 22-bit output vector on the host/emulator channel, a
// 36-bit input test vector word and a 22-bit expected-output word in the
// test vector memories (TVMs), a 19-bit TVM address and the 275262 vectors
// of the largest test set. The transactor state type follows the four
// states of the vendor data-streaming transactor. (Linting this package on
// its own reports the constants as unused; the modules import them.)
package comod_pkg;

  // Host <-> emulator channel widths (streaming case)
  localparam int unsigned IN_VEC_W  = 33;
  localparam int unsigned OUT_VEC_W = 22;

  // Test vector memories
  localparam int unsigned TVM_ADDR_W  = 19;
  localparam int unsigned TVM_IN_W    = 36;
  localparam int unsigned TVM_OUT_W   = 22;
  localparam int unsigned TVM_NUM_VECTORS = 275262;

  // Transactor states
  typedef enum logic [1:0] {
    XS_IDLE    = 2'd0,
    XS_ACTIVE  = 2'd1,
    XS_RCVWAIT = 2'd2,
    XS_TXWAIT  = 2'd3
  } xact_state_e;

  // Pins of the Reed-Solomon coder core, as unpacked from an input TVM word
  typedef struct packed {
    logic        i1;
    logic [10:0] i2;
    logic        i3;
    logic        i4;
    logic [4:0]  i5;
    logic        i6;   // 0 write, 1 read
    logic [15:0] i7;
  } rs_in_t;           // 36 bits

  // Outputs of the Reed-Solomon coder core, in the order they are compared
  typedef struct packed {
    logic [15:0] data_out;
    logic [1:0]  data_out_size;
    logic        ready;
    logic        data_valid;
    logic        enc_complete;
    logic        dec_complete;
  } rs_out_t;          // 22 bits

endpackage
