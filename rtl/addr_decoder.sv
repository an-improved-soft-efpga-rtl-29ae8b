// addr_decoder: row or column address decoder used while programming the array.
//
// Turns a binary address into a one-hot select of NOUT lines; all lines are low when en is low
// or the address is out of range. Purely combinational. The document names row and column
// decoders for programming; the one-hot decoding is the simplest circuit with that function.
module addr_decoder #(
  parameter int unsigned NOUT   = efpga_pkg::DEF_DY + 1,
  parameter int unsigned ADDR_W = (NOUT <= 2) ? 1 : $clog2(NOUT)
) (
  input  logic              en,
  input  logic [ADDR_W-1:0] addr,
  output logic [NOUT-1:0]   sel
);
  always_comb
    for (int unsigned j = 0; j < NOUT; j++)
      sel[j] = en && (addr == ADDR_W'(j));
endmodule
