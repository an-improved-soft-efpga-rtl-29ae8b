// cfg_mux: configuration-controlled multiplexer.
//
// One primitive serves as the CLB input multiplexer (G), the LUT input multiplexer (M) and the
// switch multiplexer of the routing. The select comes from configuration memory; a select value
// at or above NIN drives 0, so that unused encodings of a power-of-two select are harmless.
// Purely combinational. The role of the multiplexers follows the fabric description; the
// "out of range selects 0" rule is this design's own. In the array, chains of these multiplexers
// form the structural combinational loops of programmable routing; configuration opens them.
module cfg_mux #(
  parameter int unsigned NIN   = 8,
  parameter int unsigned SEL_W = (NIN <= 2) ? 1 : $clog2(NIN)
) (
  input  logic [NIN-1:0]   in,
  input  logic [SEL_W-1:0] sel,
  output logic             out
);
  always_comb begin
    out = 1'b0;
    for (int unsigned j = 0; j < NIN; j++)
      if (sel == SEL_W'(j)) out = in[j];
  end
endmodule
