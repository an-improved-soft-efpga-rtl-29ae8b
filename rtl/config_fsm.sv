// config_fsm: configuration state machine that loads the bitstream into the array.
//
// After a one-cycle start pulse the machine accepts one CFG_W-bit word per cycle over a
// valid/ready stream. Words are written in the order: frame word 0..WORDS-1 of a tile, tiles
// of a row from column 0 to COLS-1, rows 0 to ROWS-1. For every accepted word it drives the
// binary row, column and word addresses with we high in that same cycle; the row and column
// decoders and the tile memories take the write at the next rising edge. After the last word the
// machine enters DONE, where done stays high (and the fabric runs) until the next start or reset.
// A full load therefore takes ROWS*COLS*WORDS accepted words, with done rising on the cycle after
// the last one. The document names a parameterized configuration state machine; its states,
// word order and stream handshake are this design's own.
module config_fsm #(
  parameter int unsigned ROWS   = efpga_pkg::DEF_DY + 1,
  parameter int unsigned COLS   = efpga_pkg::DEF_DX + 1,
  parameter int unsigned WORDS  = 7,
  parameter int unsigned CFG_W  = efpga_pkg::DEF_CFG_W,
  localparam int unsigned ROW_W  = (ROWS  <= 2) ? 1 : $clog2(ROWS),
  localparam int unsigned COL_W  = (COLS  <= 2) ? 1 : $clog2(COLS),
  localparam int unsigned WORD_W = (WORDS <= 2) ? 1 : $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              valid,
  input  logic [CFG_W-1:0]  data,
  output logic              ready,
  output logic [ROW_W-1:0]  row,
  output logic [COL_W-1:0]  col,
  output logic [WORD_W-1:0] word,
  output logic [CFG_W-1:0]  wdata,
  output logic              we,
  output logic              done
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_DONE} state_e;
  state_e state;

  logic last_word, last_col, last_row;
  always_comb begin
    last_word = (word == WORD_W'(WORDS - 1));
    last_col  = (col  == COL_W'(COLS - 1));
    last_row  = (row  == ROW_W'(ROWS - 1));
    ready     = (state == S_LOAD);
    we        = ready && valid;
    wdata     = data;
    done      = (state == S_DONE);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= S_IDLE;
      row   <= '0;
      col   <= '0;
      word  <= '0;
    end else if (start) begin
      state <= S_LOAD;
      row   <= '0;
      col   <= '0;
      word  <= '0;
    end else if (we) begin
      if (!last_word) word <= word + 1'b1;
      else begin
        word <= '0;
        if (!last_col) col <= col + 1'b1;
        else begin
          col <= '0;
          if (!last_row) row <= row + 1'b1;
          else begin
            row   <= '0;
            state <= S_DONE;
          end
        end
      end
    end

  // A write is only ever issued inside the array.
  a_we_in_range: assert property (@(posedge clk) disable iff (!rst_n)
      we |-> (32'(row) < ROWS && 32'(col) < COLS && 32'(word) < WORDS));
endmodule
