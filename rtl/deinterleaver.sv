// deinterleaver - inverse of the interleaver, between the Viterbi decoder
// and the Reed-Solomon decoder.
//
// Words of ROWS bits arriving on the data slave port `vit_data` are stored
// bit-serially: bit r of word n goes to position n of row r (n = 0 ..
// COLS*SYM_W-1). A word on the control slave port `vit_ctrl` ends loading.
// The rows are then read out row by row, in groups of SYM_W bits, the first
// stored bit becoming the most significant bit of a symbol: row 0 gives
// symbols 0..COLS-1 of codeword 0, then row 1 gives codeword 1, each sent on
// the data master port `rs_data`. A 1 on the control master port `rs_ctrl`
// follows the last symbol and the block returns to loading with its write
// pointer at 0. Feeding it the interleaver's output returns the interleaver's
// input symbols in their original order.
//
// Timing: one word per rising clock edge on each port while the other side
// keeps its half of the handshake high; 1024 words in, 256 symbols out by
// default. Words beyond COLS*SYM_W are not acknowledged until the block has
// been sent. Reset is synchronous, active high.
module deinterleaver #(
  parameter int unsigned ROWS  = 2,
  parameter int unsigned COLS  = 128,
  parameter int unsigned SYM_W = 8
) (
  input logic          clk,
  input logic          rst,
  ms_full_if.slave     vit_data,
  ms_full_if.slave     vit_ctrl,
  ms_full_if.master    rs_data,
  ms_full_if.master    rs_ctrl
);

  localparam int unsigned NBITS = COLS * SYM_W;
  localparam int unsigned ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned COL_W = (COLS > 1) ? $clog2(COLS) : 1;
  localparam int unsigned POS_W = $clog2(NBITS);

  typedef enum logic [1:0] {S_LOAD, S_SEND, S_CTRL} state_e;

  state_e           state_q;
  logic [NBITS-1:0] bits [ROWS];
  logic [POS_W-1:0] wr_pos_q;
  logic             full_q;
  logic [ROW_W-1:0] rd_row_q;
  logic [COL_W-1:0] rd_col_q;
  logic [SYM_W-1:0] out_sym;

  // symbol rd_col_q of row rd_row_q, first stored bit as the MSB
  always_comb begin
    for (int m = 0; m < SYM_W; m++)
      out_sym[SYM_W-1-m] = bits[rd_row_q][rd_col_q * SYM_W + m];
  end

  assign vit_data.ack = (state_q == S_LOAD) && !full_q;
  assign vit_ctrl.ack = (state_q == S_LOAD);
  assign rs_data.req  = (state_q == S_SEND);
  assign rs_data.data = out_sym;
  assign rs_ctrl.req  = (state_q == S_CTRL);
  assign rs_ctrl.data = 1'b1;

  always_ff @(posedge clk) begin
    if (vit_data.req && vit_data.ack)
      for (int r = 0; r < ROWS; r++) bits[r][wr_pos_q] <= vit_data.data[r];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q  <= S_LOAD;
      wr_pos_q <= '0;
      full_q   <= 1'b0;
      rd_row_q <= '0;
      rd_col_q <= '0;
    end else begin
      unique case (state_q)
        S_LOAD: begin
          if (vit_data.req && vit_data.ack) begin
            if (wr_pos_q == POS_W'(NBITS - 1)) full_q <= 1'b1;
            wr_pos_q <= wr_pos_q + 1'b1;
          end
          if (vit_ctrl.req && vit_ctrl.ack) begin
            state_q  <= S_SEND;
            rd_row_q <= '0;
            rd_col_q <= '0;
          end
        end
        S_SEND: begin
          if (rs_data.ack) begin
            if (rd_col_q == COL_W'(COLS - 1)) begin
              rd_col_q <= '0;
              if (rd_row_q == ROW_W'(ROWS - 1)) state_q  <= S_CTRL;
              else                              rd_row_q <= rd_row_q + 1'b1;
            end else begin
              rd_col_q <= rd_col_q + 1'b1;
            end
          end
        end
        S_CTRL: begin
          if (rs_ctrl.ack) begin
            state_q  <= S_LOAD;
            wr_pos_q <= '0;
            full_q   <= 1'b0;
          end
        end
        default: state_q <= S_LOAD;
      endcase
    end
  end

endmodule
