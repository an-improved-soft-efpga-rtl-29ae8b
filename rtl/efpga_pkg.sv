// efpga_pkg: architecture parameters, side numbering and configuration-frame layout of the
// island-style soft eFPGA.
//
// The fabric is a DX x DY array of tiles. Each regular tile holds one cluster (CLB) of N BLEs
// built around K-input LUTs, the input multiplexers that connect the CLB to the four channel
// segments around it, and a switch block at its top-right corner. The array sizes and K, N come
// from the reference 14x14 array of 784 4-LUTs; the channel width W, the number of CLB inputs I
// and the configuration word width CFG_W are this design's own choices.
//
// Every tile owns one configuration frame, loaded CFG_W bits at a time. Frame bit layout (LSB
// first):
//   [0 .. SB_BITS)            switch multiplexer selects, output (side, track) at
//                             (side*W/2 + track)*SSEL_W
//   [SB_BITS .. +CB_BITS)     input multiplexer select of CLB pin p at p*GSEL_W
//   [.. +N*BLE_BITS)          BLE n: 2^K truth-table bits, then K LUT-input multiplexer
//                             selects of MSEL_W bits, then one bit "registered output"
// Edge tiles store only the switch-block part of the frame.
package efpga_pkg;

  parameter int unsigned DEF_DX    = 14;
  parameter int unsigned DEF_DY    = 14;
  parameter int unsigned DEF_K     = 4;
  parameter int unsigned DEF_N     = 4;
  parameter int unsigned DEF_W     = 8;   // wires per channel segment, W/2 in each direction
  parameter int unsigned DEF_I     = 10;  // CLB input pins
  parameter int unsigned DEF_CFG_W = 32;  // configuration word width

  // Sides of a switch block or CLB.
  typedef enum logic [1:0] {
    SIDE_N = 2'd0,
    SIDE_E = 2'd1,
    SIDE_S = 2'd2,
    SIDE_W = 2'd3
  } side_e;

  // Switch multiplexer inputs: 0 is "off" (drives 0), 1..3 are the same-index wire arriving on
  // side (out_side + sel) mod 4, 4..4+N-1 are the CLB outputs.
  localparam int unsigned SB_SEL_CLB = 4;

  function automatic int unsigned clog2_min1(int unsigned v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

  function automatic int unsigned sb_sel_w(int unsigned n);
    return clog2_min1(SB_SEL_CLB + n);
  endfunction

  function automatic int unsigned g_sel_w(int unsigned w);
    return clog2_min1(w);
  endfunction

  function automatic int unsigned m_sel_w(int unsigned i, int unsigned n);
    return clog2_min1(i + n);
  endfunction

  function automatic int unsigned sb_bits(int unsigned w, int unsigned n);
    return 4 * (w / 2) * sb_sel_w(n);
  endfunction

  function automatic int unsigned cb_bits(int unsigned w, int unsigned i);
    return i * g_sel_w(w);
  endfunction

  function automatic int unsigned ble_bits(int unsigned k, int unsigned i, int unsigned n);
    return (1 << k) + k * m_sel_w(i, n) + 1;
  endfunction

  function automatic int unsigned clb_bits(int unsigned k, int unsigned i, int unsigned n);
    return n * ble_bits(k, i, n);
  endfunction

  function automatic int unsigned frame_bits(int unsigned k, int unsigned n, int unsigned w,
                                             int unsigned i);
    return sb_bits(w, n) + cb_bits(w, i) + clb_bits(k, i, n);
  endfunction

  function automatic int unsigned frame_words(int unsigned bits, int unsigned cfg_w);
    return (bits + cfg_w - 1) / cfg_w;
  endfunction

  // Bit offsets inside a tile frame.
  function automatic int unsigned off_sb(int unsigned w, int unsigned n, int unsigned side,
                                         int unsigned track);
    return (side * (w / 2) + track) * sb_sel_w(n);
  endfunction

  function automatic int unsigned off_cb(int unsigned w, int unsigned n, int unsigned pin);
    return sb_bits(w, n) + pin * g_sel_w(w);
  endfunction

  function automatic int unsigned off_ble(int unsigned k, int unsigned n, int unsigned w,
                                          int unsigned i, int unsigned ble);
    return sb_bits(w, n) + cb_bits(w, i) + ble * ble_bits(k, i, n);
  endfunction

endpackage
