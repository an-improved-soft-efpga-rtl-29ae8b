// ble: basic logic element - a K-input LUT, a D flip-flop and the output multiplexer H.
//
// The LUT output is registered on every rising clk edge; cfg_ff chooses whether the BLE drives
// the registered (1) or the combinational (0) value. While en is low (the fabric is not yet
// configured) the flip-flop is held at 0 and the output is forced to 0, so no partially loaded
// configuration can toggle the fabric. rst_n is an asynchronous active-low reset of the
// flip-flop. LUT, flip-flop and H follow the tile drawing; the enable gating and the reset are
// this design's own choices. The LUT-to-output path is combinational and, inside the fabric, is
// part of the structural loops of the programmable routing and the CLB feedback.
module ble #(
  parameter int unsigned K = efpga_pkg::DEF_K
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [(1<<K)-1:0] cfg_lut,
  input  logic              cfg_ff,
  input  logic [K-1:0]      in,
  output logic              out
);
  logic lut_out, q;

  lut #(.K(K)) u_lut (.cfg(cfg_lut), .in(in), .out(lut_out));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   q <= 1'b0;
    else if (!en) q <= 1'b0;
    else          q <= lut_out;

  always_comb out = en & (cfg_ff ? q : lut_out);
endmodule
