// config_memory: the configuration store of one tile, built from flip-flops.
//
// The frame of FRAME_BITS bits is divided into WORDS words of CFG_W bits; word a holds frame bits
// [a*CFG_W +: CFG_W] (the last word may be partly unused). A word is written on the rising clk
// edge when we is high; a write to an address at or above WORDS is ignored. rst_n clears the
// whole frame asynchronously, which leaves every routing multiplexer off. The frame is read out
// continuously from the flip-flops. Flip-flops as configuration memory follow the generic standard-cell flow of the
// document; the word organisation, the write port and the reset are this design's own choices.
module config_memory #(
  parameter int unsigned FRAME_BITS = 210,
  parameter int unsigned CFG_W      = efpga_pkg::DEF_CFG_W,
  localparam int unsigned WORDS  = (FRAME_BITS + CFG_W - 1) / CFG_W,
  localparam int unsigned ADDR_W = (WORDS <= 2) ? 1 : $clog2(WORDS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  we,
  input  logic [ADDR_W-1:0]     addr,
  input  logic [CFG_W-1:0]      wdata,
  output logic [FRAME_BITS-1:0] frame
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) frame <= '0;
    else if (we)
      for (int unsigned b = 0; b < FRAME_BITS; b++)
        if (ADDR_W'(b / CFG_W) == addr) frame[b] <= wdata[b % CFG_W];
endmodule
