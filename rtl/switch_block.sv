// switch_block: the switch multiplexers at one switch point of the routing grid.
//
// All routing wires are single length and directional: each wire is driven by the switch block
// where it starts and ends at the next switch block. Every wire leaving on side s, track t is
// driven by one switch multiplexer whose select means: 0 off (drives 0); 1, 2, 3 the track-t
// wire arriving on side (s+1), (s+2), (s+3) mod 4 (a disjoint switch pattern); 4..4+N-1 the
// outputs of the CLB of this tile. cfg holds one SSEL_W-bit select per (side, track) at
// (side*W/2 + track)*SSEL_W. Purely combinational.
// Single-length wires and switch multiplexers follow the document; directional wires, the
// disjoint pattern and CLB outputs entering through the switch multiplexers are this design's
// own choices, made because tristate track drivers cannot be written as two-state logic.
// Wired into an array, the blocks form structural combinational loops (a wire can be routed
// around a ring of switch blocks); this is inherent to programmable routing, and the
// configuration decides whether any loop is used.
module switch_block #(
  parameter int unsigned W = efpga_pkg::DEF_W,
  parameter int unsigned N = efpga_pkg::DEF_N,
  localparam int unsigned HW     = W / 2,
  localparam int unsigned SSEL_W = efpga_pkg::sb_sel_w(N),
  localparam int unsigned NSEL   = efpga_pkg::SB_SEL_CLB + N
) (
  input  logic [HW-1:0]          sb_in  [4],
  input  logic [N-1:0]           clb_out,
  input  logic [4*HW*SSEL_W-1:0] cfg,
  output logic [HW-1:0]          sb_out [4]
);
  for (genvar s = 0; s < 4; s++) begin : g_side
    for (genvar t = 0; t < HW; t++) begin : g_track
      logic [NSEL-1:0] cand;
      assign cand = {clb_out, sb_in[(s+3)%4][t], sb_in[(s+2)%4][t], sb_in[(s+1)%4][t],
                     1'b0};
      cfg_mux #(.NIN(NSEL), .SEL_W(SSEL_W)) u_sw (
        .in(cand), .sel(cfg[(s*HW + t)*SSEL_W +: SSEL_W]), .out(sb_out[s][t]));
    end
  end
endmodule
