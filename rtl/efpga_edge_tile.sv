// efpga_edge_tile: left-edge, bottom-edge or corner tile of the array.
//
// These tiles close the routing grid on the left and bottom: each holds only a switch block and
// the configuration memory for it, with no CLB (its CLB-output selects drive 0). The memory
// stores the switch-block part of a frame (the first words of the regular frame layout); writes
// to the higher word addresses of a frame are ignored, so every tile position of the array is
// addressed the same way. Timing: combinational from sb_in to sb_out; configuration writes on the
// rising clk edge when cfg_we is high. The edge tiles and their content follow the array drawing
// of the document; the shared frame addressing is this design's own choice.
module efpga_edge_tile #(
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
  input  logic              cfg_we,
  input  logic [ADDR_W-1:0] cfg_addr,
  input  logic [CFG_W-1:0]  cfg_wdata,
  input  logic [HW-1:0]     sb_in  [4],
  output logic [HW-1:0]     sb_out [4]
);
  localparam int unsigned SBB    = efpga_pkg::sb_bits(W, N);
  localparam int unsigned SWORDS = efpga_pkg::frame_words(SBB, CFG_W);
  localparam int unsigned SADDR_W = (SWORDS <= 2) ? 1 : $clog2(SWORDS);

  logic [SBB-1:0] frame;
  logic           we_sb;

  // Words beyond the switch-block part belong to the (absent) CLB: drop them.
  always_comb we_sb = cfg_we && (cfg_addr < ADDR_W'(SWORDS));

  config_memory #(.FRAME_BITS(SBB), .CFG_W(CFG_W)) u_cfg (
    .clk(clk), .rst_n(rst_n), .we(we_sb), .addr(SADDR_W'(cfg_addr)), .wdata(cfg_wdata),
    .frame(frame));

  switch_block #(.W(W), .N(N)) u_sb (
    .sb_in(sb_in), .clb_out('0), .cfg(frame), .sb_out(sb_out));
endmodule
