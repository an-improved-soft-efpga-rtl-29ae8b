// efpga_top: island-style soft eFPGA - a DX x DY array of logic tiles with single-length
// routing, perimeter I/O, and a configuration state machine with row and column decoders.
//
// Grid: switch blocks sit at positions (i, j), i = 0..DX, j = 0..DY. Position (x, y) with
// x, y >= 1 is a regular tile whose CLB lies below-left of its switch block; column 0 holds the
// left edge tiles, row 0 the bottom edge tiles and (0, 0) the corner tile, which carry a switch
// block only. Every routing wire is single length and directional: it starts at one switch block
// and ends at the next. The channel segment above CLB (x, y) carries the W/2 east-going wires of
// switch block (x-1, y) (bits 0..W/2-1) and the W/2 west-going wires of (x, y) (upper bits);
// the segment right of CLB (x, y) carries the south-going wires of (x, y) (low bits) and the
// north-going wires of (x, y-1) (upper bits). A CLB sees the segments above, right of, below and
// left of it. Wires arriving from outside the array at a boundary switch block are the io_*_in
// ports; wires a boundary switch block drives outwards are the io_*_out ports, W/2 per switch
// block side, indexed by column (north, south) or row (east, west).
//
// Configuration: pulse cfg_start, then stream (DX+1)*(DY+1)*WORDS words of CFG_W bits on
// cfg_valid/cfg_data, one per cycle while cfg_ready is high, in the order word, column, row (see
// config_fsm and efpga_pkg for the frame layout). cfg_done goes high one cycle after the last
// word and enables the BLEs; until then every BLE output and flip-flop is held at 0.
//
// The tile array, the edge tiles, the configuration state machine and the decoders follow the
// document; the routing conventions, the I/O placement on the boundary switch blocks and the
// stream interface are this design's own. The routing forms structural combinational loops
// through the switch blocks, as in any programmable fabric; a bitstream that closes one is a
// user error.
module efpga_top #(
  parameter int unsigned DX    = efpga_pkg::DEF_DX,
  parameter int unsigned DY    = efpga_pkg::DEF_DY,
  parameter int unsigned K     = efpga_pkg::DEF_K,
  parameter int unsigned N     = efpga_pkg::DEF_N,
  parameter int unsigned W     = efpga_pkg::DEF_W,
  parameter int unsigned I     = efpga_pkg::DEF_I,
  parameter int unsigned CFG_W = efpga_pkg::DEF_CFG_W,
  localparam int unsigned HW = W / 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_start,
  input  logic             cfg_valid,
  input  logic [CFG_W-1:0] cfg_data,
  output logic             cfg_ready,
  output logic             cfg_done,
  input  logic [HW-1:0]    io_n_in  [DX+1],
  output logic [HW-1:0]    io_n_out [DX+1],
  input  logic [HW-1:0]    io_s_in  [DX+1],
  output logic [HW-1:0]    io_s_out [DX+1],
  input  logic [HW-1:0]    io_e_in  [DY+1],
  output logic [HW-1:0]    io_e_out [DY+1],
  input  logic [HW-1:0]    io_w_in  [DY+1],
  output logic [HW-1:0]    io_w_out [DY+1]
);
  import efpga_pkg::*;

  localparam int unsigned FBITS  = frame_bits(K, N, W, I);
  localparam int unsigned WORDS  = frame_words(FBITS, CFG_W);
  localparam int unsigned WORD_W = (WORDS <= 2) ? 1 : $clog2(WORDS);
  localparam int unsigned ROWS   = DY + 1;
  localparam int unsigned COLS   = DX + 1;
  localparam int unsigned ROW_W  = (ROWS <= 2) ? 1 : $clog2(ROWS);
  localparam int unsigned COL_W  = (COLS <= 2) ? 1 : $clog2(COLS);

  // ---------------- configuration ----------------
  logic [ROW_W-1:0]  cfg_row;
  logic [COL_W-1:0]  cfg_col;
  logic [WORD_W-1:0] cfg_word;
  logic [CFG_W-1:0]  cfg_wdata;
  logic              cfg_we;
  logic [ROWS-1:0]   row_sel;
  logic [COLS-1:0]   col_sel;

  config_fsm #(.ROWS(ROWS), .COLS(COLS), .WORDS(WORDS), .CFG_W(CFG_W)) u_fsm (
    .clk(clk), .rst_n(rst_n), .start(cfg_start), .valid(cfg_valid), .data(cfg_data),
    .ready(cfg_ready), .row(cfg_row), .col(cfg_col), .word(cfg_word), .wdata(cfg_wdata),
    .we(cfg_we), .done(cfg_done));

  addr_decoder #(.NOUT(ROWS), .ADDR_W(ROW_W)) u_row_dec (
    .en(cfg_we), .addr(cfg_row), .sel(row_sel));
  addr_decoder #(.NOUT(COLS), .ADDR_W(COL_W)) u_col_dec (
    .en(cfg_we), .addr(cfg_col), .sel(col_sel));

  // ---------------- routing grid ----------------
  logic [HW-1:0] sbo [COLS][ROWS][4];  // wires leaving switch block (i, j) on each side
  logic [HW-1:0] sbi [COLS][ROWS][4];  // wires arriving at switch block (i, j) on each side

  for (genvar i = 0; i < COLS; i++) begin : g_col
    for (genvar j = 0; j < ROWS; j++) begin : g_row
      if (j == DY) begin : g_n_io
        assign sbi[i][j][SIDE_N] = io_n_in[i];
        assign io_n_out[i]       = sbo[i][j][SIDE_N];
      end else begin : g_n
        assign sbi[i][j][SIDE_N] = sbo[i][j+1][SIDE_S];
      end
      if (j == 0) begin : g_s_io
        assign sbi[i][j][SIDE_S] = io_s_in[i];
        assign io_s_out[i]       = sbo[i][j][SIDE_S];
      end else begin : g_s
        assign sbi[i][j][SIDE_S] = sbo[i][j-1][SIDE_N];
      end
      if (i == DX) begin : g_e_io
        assign sbi[i][j][SIDE_E] = io_e_in[j];
        assign io_e_out[j]       = sbo[i][j][SIDE_E];
      end else begin : g_e
        assign sbi[i][j][SIDE_E] = sbo[i+1][j][SIDE_W];
      end
      if (i == 0) begin : g_w_io
        assign sbi[i][j][SIDE_W] = io_w_in[j];
        assign io_w_out[j]       = sbo[i][j][SIDE_W];
      end else begin : g_w
        assign sbi[i][j][SIDE_W] = sbo[i-1][j][SIDE_E];
      end

      logic tile_we;
      assign tile_we = row_sel[j] & col_sel[i];

      if (i == 0 || j == 0) begin : g_edge
        efpga_edge_tile #(.K(K), .N(N), .W(W), .I(I), .CFG_W(CFG_W)) u_tile (
          .clk(clk), .rst_n(rst_n), .cfg_we(tile_we), .cfg_addr(cfg_word), .cfg_wdata(cfg_wdata),
          .sb_in(sbi[i][j]), .sb_out(sbo[i][j]));
      end else begin : g_regular
        logic [W-1:0] seg_n, seg_e, seg_s, seg_w;
        assign seg_n = {sbo[i][j][SIDE_W],   sbo[i-1][j][SIDE_E]};
        assign seg_s = {sbo[i][j-1][SIDE_W], sbo[i-1][j-1][SIDE_E]};
        assign seg_e = {sbo[i][j-1][SIDE_N], sbo[i][j][SIDE_S]};
        assign seg_w = {sbo[i-1][j-1][SIDE_N], sbo[i-1][j][SIDE_S]};
        efpga_tile #(.K(K), .N(N), .W(W), .I(I), .CFG_W(CFG_W)) u_tile (
          .clk(clk), .rst_n(rst_n), .en(cfg_done), .cfg_we(tile_we), .cfg_addr(cfg_word),
          .cfg_wdata(cfg_wdata), .seg_n(seg_n), .seg_e(seg_e), .seg_s(seg_s), .seg_w(seg_w),
          .sb_in(sbi[i][j]), .sb_out(sbo[i][j]));
      end
    end
  end

  // The decoders select exactly one tile per configuration write.
  a_one_tile: assert property (@(posedge clk) disable iff (!rst_n)
      cfg_we |-> ($onehot(row_sel) && $onehot(col_sel)));
endmodule
