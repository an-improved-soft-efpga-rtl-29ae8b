// efpga_tile: one regular island of the fabric - the unit synthesized once and replicated.
//
// The tile holds a CLB of N K-LUT BLEs, the connection block whose input multiplexers feed the
// CLB's I pins from the four channel segments around it, the switch block at the tile's
// top-right corner (which also takes the CLB outputs onto the routing) and the tile's
// configuration memory. The frame layout is given in efpga_pkg. The configuration port writes
// one CFG_W-bit word on the rising clk edge when cfg_we is high (cfg_we is the AND of the row and
// column selects). Timing: combinational from the segments and sb_in to sb_out, plus one cycle
// through a BLE set to registered output. The grouping follows the tile drawing of the
// document; the wiring conventions are this design's own. The switch block's outputs reach its
// own CLB's segments through the array, so the array has structural combinational loops, as any
// programmable routing fabric has; the configuration decides whether one is used.
module efpga_tile #(
  parameter int unsigned K     = efpga_pkg::DEF_K,
  parameter int unsigned N     = efpga_pkg::DEF_N,
  parameter int unsigned W     = efpga_pkg::DEF_W,
  parameter int unsigned I     = efpga_pkg::DEF_I,
  parameter int unsigned CFG_W = efpga_pkg::DEF_CFG_W,
  localparam int unsigned HW     = W / 2,
  localparam int unsigned FBITS  = efpga_pkg::frame_bits(K, N, W, I),
  localparam int unsigned WORDS  = efpga_pkg::frame_words(FBITS, CFG_W),
  localparam int unsigned ADDR_W = (WORDS <= 2) ? 1 : $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,         // fabric configured and running
  input  logic              cfg_we,
  input  logic [ADDR_W-1:0] cfg_addr,
  input  logic [CFG_W-1:0]  cfg_wdata,
  input  logic [W-1:0]      seg_n,      // channel segment above the CLB
  input  logic [W-1:0]      seg_e,      // channel segment right of the CLB
  input  logic [W-1:0]      seg_s,      // channel segment below the CLB
  input  logic [W-1:0]      seg_w,      // channel segment left of the CLB
  input  logic [HW-1:0]     sb_in  [4], // wires arriving at the switch block, per side
  output logic [HW-1:0]     sb_out [4]  // wires leaving the switch block, per side
);
  localparam int unsigned SBB = efpga_pkg::sb_bits(W, N);
  localparam int unsigned CBB = efpga_pkg::cb_bits(W, I);
  localparam int unsigned CLBB = efpga_pkg::clb_bits(K, I, N);

  logic [FBITS-1:0] frame;
  logic [I-1:0]     pin;
  logic [N-1:0]     clb_out;

  config_memory #(.FRAME_BITS(FBITS), .CFG_W(CFG_W)) u_cfg (
    .clk(clk), .rst_n(rst_n), .we(cfg_we), .addr(cfg_addr), .wdata(cfg_wdata), .frame(frame));

  connection_block #(.W(W), .I(I)) u_cb (
    .seg_n(seg_n), .seg_e(seg_e), .seg_s(seg_s), .seg_w(seg_w),
    .cfg(frame[SBB +: CBB]), .pin(pin));

  clb #(.K(K), .N(N), .I(I)) u_clb (
    .clk(clk), .rst_n(rst_n), .en(en), .cfg(frame[SBB+CBB +: CLBB]), .pin_in(pin), .out(clb_out));

  switch_block #(.W(W), .N(N)) u_sb (
    .sb_in(sb_in), .clb_out(clb_out), .cfg(frame[0 +: SBB]), .sb_out(sb_out));
endmodule
