// clb: cluster of N BLEs with a fully populated local interconnect.
//
// Every LUT input of every BLE has its own LUT input multiplexer (M) that chooses among the I
// cluster input pins (selects 0..I-1) and the N BLE outputs fed back (selects I..I+N-1); larger
// selects give 0. cfg holds, per BLE n at n*BLE_BITS: the 2^K truth-table bits, K selects of
// MSEL_W bits and the registered-output bit. Outputs are the N BLE outputs. Combinational from
// pin_in to out when a BLE is set to combinational output; one cycle when registered. The
// cluster of LUTs, flip-flops and M multiplexers follows the tile drawing; the full M
// connectivity and the pin count are this design's own choices. A BLE set to combinational
// output can be fed back to its own LUT, so the feedback path is a structural combinational loop;
// a configuration must not close it without a registered BLE in it.
module clb #(
  parameter int unsigned K = efpga_pkg::DEF_K,
  parameter int unsigned N = efpga_pkg::DEF_N,
  parameter int unsigned I = efpga_pkg::DEF_I,
  localparam int unsigned MSEL_W   = efpga_pkg::m_sel_w(I, N),
  localparam int unsigned BLE_BITS = efpga_pkg::ble_bits(K, I, N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic [N*BLE_BITS-1:0] cfg,
  input  logic [I-1:0]          pin_in,
  output logic [N-1:0]          out
);
  localparam int unsigned LB = 1 << K;

  logic [I+N-1:0] local_in;
  always_comb local_in = {out, pin_in};

  for (genvar n = 0; n < N; n++) begin : g_ble
    logic [BLE_BITS-1:0] c;
    logic [K-1:0]        lin;
    assign c = cfg[n*BLE_BITS +: BLE_BITS];
    for (genvar k = 0; k < K; k++) begin : g_m
      cfg_mux #(.NIN(I+N), .SEL_W(MSEL_W)) u_m (
        .in(local_in), .sel(c[LB + k*MSEL_W +: MSEL_W]), .out(lin[k]));
    end
    ble #(.K(K)) u_ble (
      .clk(clk), .rst_n(rst_n), .en(en),
      .cfg_lut(c[LB-1:0]), .cfg_ff(c[LB + K*MSEL_W]),
      .in(lin), .out(out[n]));
  end
endmodule
