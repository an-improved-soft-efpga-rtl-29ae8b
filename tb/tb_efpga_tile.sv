// tb_efpga_tile: self-checking test of one regular tile (default sizes). A frame is built from
// the layout in efpga_pkg, written word by word through the configuration port, and the tile is
// then driven from its segments and switch-block inputs:
//   pins 0..3 take wire 2 of the north segment, 5 of east, 0 of south, 7 of west;
//   BLE0 is their combinational XOR, BLE1 registers BLE0 through the feedback path;
//   switch outputs: north track 1 = BLE0, west track 3 = BLE1, east track 0 = west-side input
//   track 0, south track 2 = north-side input track 2; every other output is off (0).
module tb_efpga_tile;
  import efpga_pkg::*;
  localparam int unsigned K = DEF_K, N = DEF_N, W = DEF_W, I = DEF_I, CW = DEF_CFG_W;
  localparam int unsigned HW = W / 2;
  localparam int unsigned FB = frame_bits(K, N, W, I), WORDS = frame_words(FB, CW);
  localparam int unsigned SS = sb_sel_w(N), GS = g_sel_w(W), MS = m_sel_w(I, N);

  logic clk = 0, rst_n = 0, en = 0, cfg_we = 0;
  logic [2:0]    cfg_addr = '0;
  logic [CW-1:0] cfg_wdata = '0;
  logic [W-1:0]  seg_n, seg_e, seg_s, seg_w;
  logic [HW-1:0] sb_in [4];
  logic [HW-1:0] sb_out [4];
  logic [WORDS*CW-1:0] frame;
  int checks = 0, failures = 0;

  efpga_tile dut (
    .clk(clk), .rst_n(rst_n), .en(en), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
    .cfg_wdata(cfg_wdata), .seg_n(seg_n), .seg_e(seg_e), .seg_s(seg_s), .seg_w(seg_w),
    .sb_in(sb_in), .sb_out(sb_out));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic set_sb(int side, int track, int sel);
    frame[off_sb(W, N, side, track) +: SS] = SS'(sel);
  endtask

  initial begin
    logic x, r1;
    frame = '0;
    frame[off_cb(W, N, 0) +: GS] = GS'(2);
    frame[off_cb(W, N, 1) +: GS] = GS'(5);
    frame[off_cb(W, N, 2) +: GS] = GS'(0);
    frame[off_cb(W, N, 3) +: GS] = GS'(7);
    // BLE0: XOR of pins 0..3
    frame[off_ble(K, N, W, I, 0) +: 16] = 16'h6996;
    for (int k = 0; k < 4; k++) frame[off_ble(K, N, W, I, 0) + 16 + k*MS +: MS] = MS'(k);
    // BLE1: registered copy of BLE0
    frame[off_ble(K, N, W, I, 1) +: 16] = 16'hAAAA;
    frame[off_ble(K, N, W, I, 1) + 16 +: MS] = MS'(I);
    for (int k = 1; k < 4; k++) frame[off_ble(K, N, W, I, 1) + 16 + k*MS +: MS] = '1;
    frame[off_ble(K, N, W, I, 1) + 16 + 4*MS] = 1'b1;
    set_sb(SIDE_N, 1, SB_SEL_CLB + 0);
    set_sb(SIDE_W, 3, SB_SEL_CLB + 1);
    set_sb(SIDE_E, 0, (SIDE_W - SIDE_E) % 4);
    set_sb(SIDE_S, 2, (SIDE_N - SIDE_S + 4) % 4);

    seg_n = '0; seg_e = '0; seg_s = '0; seg_w = '0;
    foreach (sb_in[s]) sb_in[s] = '1;
    #12 rst_n = 1;
    #1 foreach (sb_out[s]) chk(sb_out[s] == '0, "unconfigured tile is quiet");
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 3'(w); cfg_wdata = frame[w*CW +: CW];
    end
    @(negedge clk);
    cfg_we = 0;
    en = 1;
    r1 = 0;
    for (int r = 0; r < 200; r++) begin
      seg_n = W'($urandom); seg_e = W'($urandom); seg_s = W'($urandom); seg_w = W'($urandom);
      foreach (sb_in[s]) sb_in[s] = HW'($urandom);
      #1;
      x = seg_n[2] ^ seg_e[5] ^ seg_s[0] ^ seg_w[7];
      chk(sb_out[SIDE_N] == HW'({x, 1'b0}), "north: BLE0 on track 1");
      chk(sb_out[SIDE_W] == HW'({r1, 3'b000}), "west: BLE1 on track 3");
      chk(sb_out[SIDE_E] == HW'({3'b000, sb_in[SIDE_W][0]}), "east: pass from west");
      chk(sb_out[SIDE_S] == HW'({1'b0, sb_in[SIDE_N][2], 2'b00}), "south: pass from north");
      @(posedge clk);
      r1 = x;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
