// connection_block: the input multiplexers (G) that connect the CLB input pins to the channel
// segments around the CLB.
//
// Pin p is served by the segment on side p mod 4 (0 north, 1 east, 2 south, 3 west) and its
// multiplexer can pick any of the W wires of that segment (flexibility 1). cfg holds one select
// of GSEL_W bits per pin, pin p at p*GSEL_W. Purely combinational. That the CLB pins are fed
// from the surrounding channels by multiplexers follows the tile drawing; the pin-to-side
// assignment and the full flexibility are this design's own choices.
module connection_block #(
  parameter int unsigned W = efpga_pkg::DEF_W,
  parameter int unsigned I = efpga_pkg::DEF_I,
  localparam int unsigned GSEL_W = efpga_pkg::g_sel_w(W)
) (
  input  logic [W-1:0]        seg_n,
  input  logic [W-1:0]        seg_e,
  input  logic [W-1:0]        seg_s,
  input  logic [W-1:0]        seg_w,
  input  logic [I*GSEL_W-1:0] cfg,
  output logic [I-1:0]        pin
);
  logic [W-1:0] seg [4];
  always_comb begin
    seg[efpga_pkg::SIDE_N] = seg_n;
    seg[efpga_pkg::SIDE_E] = seg_e;
    seg[efpga_pkg::SIDE_S] = seg_s;
    seg[efpga_pkg::SIDE_W] = seg_w;
  end

  for (genvar p = 0; p < I; p++) begin : g_pin
    cfg_mux #(.NIN(W), .SEL_W(GSEL_W)) u_g (
      .in(seg[p % 4]), .sel(cfg[p*GSEL_W +: GSEL_W]), .out(pin[p]));
  end
endmodule
