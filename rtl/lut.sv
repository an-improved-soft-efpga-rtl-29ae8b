// lut: K-input lookup table.
//
// The output is the truth-table bit addressed by the K inputs, in[0] being the least significant
// address bit. The truth table comes from the tile's configuration memory. Purely combinational.
// The function is the standard LUT of the fabric; the input-to-address bit order is this design's
// own choice.
module lut #(
  parameter int unsigned K = efpga_pkg::DEF_K
) (
  input  logic [(1<<K)-1:0] cfg,  // truth table
  input  logic [K-1:0]      in,
  output logic              out
);
  always_comb out = cfg[in];
endmodule
