// interleaver - block interleaver between the Reed-Solomon encoder and the
// convolutional (Viterbi) encoder.
//
// The memory holds ROWS codewords of COLS symbols of SYM_W bits (2 x 128 x
// 8 by default: two (128,122) Reed-Solomon codewords). Symbols arriving on
// the data slave port `rs_data` are written row by row: codeword 0 fills
// row 0, symbols 0..127, then codeword 1 fills row 1. A word on the control
// slave port `rs_ctrl` ends loading. The memory is then read column by
// column and, within a column, bit by bit from the most significant bit
// down: every output word on the master port `vit_data` is ROWS bits wide,
// bit r being bit k of symbol l of row r, for l = 0..COLS-1 and
// k = SYM_W-1..0 (COLS*SYM_W words). Consecutive bits of one codeword are
// therefore spread over ROWS output positions. When all words are sent, a
// 1 is sent on the control master port `vit_ctrl` and the block returns to
// loading with its write pointer at row 0, symbol 0.
//
// Timing: one word per rising clock edge on each port while the other side
// keeps its half of the handshake high; a block of 256 symbols in, 1024
// words out, plus one cycle per control word. Symbols beyond ROWS*COLS are
// not acknowledged until the block has been sent. Reset is synchronous,
// active high.
module interleaver #(
  parameter int unsigned ROWS  = 2,
  parameter int unsigned COLS  = 128,
  parameter int unsigned SYM_W = 8
) (
  input logic          clk,
  input logic          rst,
  ms_full_if.slave     rs_data,
  ms_full_if.slave     rs_ctrl,
  ms_full_if.master    vit_data,
  ms_full_if.master    vit_ctrl
);

  localparam int unsigned ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned COL_W = (COLS > 1) ? $clog2(COLS) : 1;
  localparam int unsigned BIT_W = (SYM_W > 1) ? $clog2(SYM_W) : 1;

  typedef enum logic [1:0] {S_LOAD, S_SEND, S_CTRL} state_e;

  state_e           state_q;
  logic [SYM_W-1:0] ram [ROWS][COLS];
  logic [ROW_W-1:0] wr_row_q;
  logic [COL_W-1:0] wr_col_q;
  logic             full_q;
  logic [COL_W-1:0] rd_col_q;
  logic [BIT_W-1:0] rd_bit_q;
  logic [ROWS-1:0]  out_word;

  always_comb begin
    for (int r = 0; r < ROWS; r++) out_word[r] = ram[r][rd_col_q][rd_bit_q];
  end

  assign rs_data.ack  = (state_q == S_LOAD) && !full_q;
  assign rs_ctrl.ack  = (state_q == S_LOAD);
  assign vit_data.req  = (state_q == S_SEND);
  assign vit_data.data = out_word;
  assign vit_ctrl.req  = (state_q == S_CTRL);
  assign vit_ctrl.data = 1'b1;

  always_ff @(posedge clk) begin
    if (rs_data.req && rs_data.ack) ram[wr_row_q][wr_col_q] <= rs_data.data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q  <= S_LOAD;
      wr_row_q <= '0;
      wr_col_q <= '0;
      full_q   <= 1'b0;
      rd_col_q <= '0;
      rd_bit_q <= BIT_W'(SYM_W - 1);
    end else begin
      unique case (state_q)
        S_LOAD: begin
          if (rs_data.req && rs_data.ack) begin
            if (wr_col_q == COL_W'(COLS - 1)) begin
              wr_col_q <= '0;
              if (wr_row_q == ROW_W'(ROWS - 1)) full_q <= 1'b1;
              else                              wr_row_q <= wr_row_q + 1'b1;
            end else begin
              wr_col_q <= wr_col_q + 1'b1;
            end
          end
          if (rs_ctrl.req && rs_ctrl.ack) begin
            state_q  <= S_SEND;
            rd_col_q <= '0;
            rd_bit_q <= BIT_W'(SYM_W - 1);
          end
        end
        S_SEND: begin
          if (vit_data.ack) begin
            if (rd_bit_q == '0) begin
              rd_bit_q <= BIT_W'(SYM_W - 1);
              if (rd_col_q == COL_W'(COLS - 1)) state_q <= S_CTRL;
              else                              rd_col_q <= rd_col_q + 1'b1;
            end else begin
              rd_bit_q <= rd_bit_q - 1'b1;
            end
          end
        end
        S_CTRL: begin
          if (vit_ctrl.ack) begin
            state_q  <= S_LOAD;
            wr_row_q <= '0;
            wr_col_q <= '0;
            full_q   <= 1'b0;
          end
        end
        default: state_q <= S_LOAD;
      endcase
    end
  end

endmodule
