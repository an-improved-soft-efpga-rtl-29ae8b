// tb_efpga_2x2: end-to-end test of the 2 x 2 array, the size of the fabricated test chip.
//
// The fabric is programmed with two small user circuits and checked from its boundary I/O:
//   Tile (1,1): a full adder. a, b, cin enter on west I/O row 1 tracks 0..2 and reach the CLB
//     over the channel above it; sum (BLE0) and carry (BLE1) are combinational and leave east
//     through switch blocks (1,1) and (2,1) to east I/O row 1 tracks 0 and 1.
//   Tile (2,2): a 2-bit counter with count enable. The enable enters on north I/O column 2
//     track 0, comes down the channel right of the CLB, and the counter bits (BLE0, BLE1,
//     registered, fed back locally) leave north on tracks 0 and 1 of north I/O column 2.
// Outputs are compared with a model for every cycle; all other boundary outputs must stay 0.
// Mechanisms counted: adder carry out, counter hold (enable low), counter wrap.
module tb_efpga_2x2;
  import efpga_pkg::*;
  localparam int unsigned DX = 2, DY = 2, K = DEF_K, N = DEF_N, W = DEF_W, I = DEF_I;
  localparam int unsigned CW = DEF_CFG_W, HW = W / 2;
  localparam int unsigned FB = frame_bits(K, N, W, I), WORDS = frame_words(FB, CW);
  localparam int unsigned SS = sb_sel_w(N), GS = g_sel_w(W), MS = m_sel_w(I, N);
  localparam int unsigned OFF_M = (1 << MS) - 1;

  logic clk = 0, rst_n = 0, cfg_start = 0, cfg_valid = 0, cfg_ready, cfg_done;
  logic [CW-1:0] cfg_data = '0;
  logic [HW-1:0] io_n_in [DX+1], io_n_out [DX+1], io_s_in [DX+1], io_s_out [DX+1];
  logic [HW-1:0] io_e_in [DY+1], io_e_out [DY+1], io_w_in [DY+1], io_w_out [DY+1];

  logic [WORDS*CW-1:0] frame [DX+1][DY+1];
  int checks = 0, failures = 0;
  int n_carry = 0, n_hold = 0, n_wrap = 0;

  efpga_top #(.DX(DX), .DY(DY)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_start(cfg_start), .cfg_valid(cfg_valid), .cfg_data(cfg_data),
    .cfg_ready(cfg_ready), .cfg_done(cfg_done),
    .io_n_in(io_n_in), .io_n_out(io_n_out), .io_s_in(io_s_in), .io_s_out(io_s_out),
    .io_e_in(io_e_in), .io_e_out(io_e_out), .io_w_in(io_w_in), .io_w_out(io_w_out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int sel_from(int out_side, int in_side);
    return (in_side - out_side + 4) % 4;
  endfunction

  task automatic set_sb(int x, int y, int side, int track, int sel);
    frame[x][y][off_sb(W, N, side, track) +: SS] = SS'(sel);
  endtask

  task automatic set_pin(int x, int y, int pin, int wsel);
    frame[x][y][off_cb(W, N, pin) +: GS] = GS'(wsel);
  endtask

  task automatic set_ble(int x, int y, int b, logic [15:0] tt, int s0, int s1, int s2, int s3,
                         logic ff);
    int o;
    o = off_ble(K, N, W, I, b);
    frame[x][y][o +: 16] = tt;
    frame[x][y][o + 16 + 0*MS +: MS] = MS'(s0);
    frame[x][y][o + 16 + 1*MS +: MS] = MS'(s1);
    frame[x][y][o + 16 + 2*MS +: MS] = MS'(s2);
    frame[x][y][o + 16 + 3*MS +: MS] = MS'(s3);
    frame[x][y][o + 16 + 4*MS] = ff;
  endtask

  initial begin
    logic [1:0] cnt;
    logic a, b, c, en;
    foreach (frame[x, y]) frame[x][y] = '0;
    // full adder in tile (1,1)
    for (int t = 0; t < 3; t++) set_sb(0, 1, SIDE_E, t, sel_from(SIDE_E, SIDE_W));
    set_pin(1, 1, 0, 0);
    set_pin(1, 1, 4, 1);
    set_pin(1, 1, 8, 2);
    set_ble(1, 1, 0, 16'h9696, 0, 4, 8, OFF_M, 1'b0);  // a ^ b ^ cin
    set_ble(1, 1, 1, 16'hE8E8, 0, 4, 8, OFF_M, 1'b0);  // majority
    set_sb(1, 1, SIDE_E, 0, SB_SEL_CLB + 0);
    set_sb(1, 1, SIDE_E, 1, SB_SEL_CLB + 1);
    set_sb(2, 1, SIDE_E, 0, sel_from(SIDE_E, SIDE_W));
    set_sb(2, 1, SIDE_E, 1, sel_from(SIDE_E, SIDE_W));
    // counter in tile (2,2)
    set_sb(2, 2, SIDE_S, 0, sel_from(SIDE_S, SIDE_N));
    set_pin(2, 2, 1, 0);
    set_ble(2, 2, 0, 16'h6666, I + 0, 1, OFF_M, OFF_M, 1'b1);  // q0 ^ en
    set_ble(2, 2, 1, 16'h6A6A, I + 1, I + 0, 1, OFF_M, 1'b1);  // q1 ^ (q0 & en)
    set_sb(2, 2, SIDE_N, 0, SB_SEL_CLB + 0);
    set_sb(2, 2, SIDE_N, 1, SB_SEL_CLB + 1);

    foreach (io_w_in[j]) io_w_in[j] = '0;
    foreach (io_e_in[j]) io_e_in[j] = '0;
    foreach (io_n_in[i]) io_n_in[i] = '0;
    foreach (io_s_in[i]) io_s_in[i] = '0;
    #12 rst_n = 1;
    @(negedge clk);
    cfg_start = 1;
    @(negedge clk);
    cfg_start = 0;
    for (int y = 0; y <= DY; y++)
      for (int x = 0; x <= DX; x++)
        for (int w = 0; w < WORDS; w++) begin
          cfg_valid = 1;
          cfg_data = frame[x][y][w*CW +: CW];
          @(negedge clk);
        end
    cfg_valid = 0;
    #1 chk(cfg_done, "configured after (DX+1)*(DY+1)*WORDS words");

    cnt = 0;
    for (int r = 0; r < 200; r++) begin
      foreach (io_w_in[j]) io_w_in[j] = HW'($urandom);
      foreach (io_e_in[j]) io_e_in[j] = HW'($urandom);
      foreach (io_n_in[i]) io_n_in[i] = HW'($urandom);
      foreach (io_s_in[i]) io_s_in[i] = HW'($urandom);
      #1;
      {c, b, a} = io_w_in[1][2:0];
      en = io_n_in[2][0];
      chk(io_e_out[1] == HW'({(a & b) | (a & c) | (b & c), a ^ b ^ c}), "full adder");
      chk(io_n_out[2] == HW'(cnt), "counter value");
      if ((a & b) | (a & c) | (b & c)) n_carry++;
      for (int j = 0; j <= DY; j++) begin
        if (j != 1) chk(io_e_out[j] == '0, "unused east outputs quiet");
        chk(io_w_out[j] == '0, "unused west outputs quiet");
      end
      for (int i = 0; i <= DX; i++) begin
        if (i != 2) chk(io_n_out[i] == '0, "unused north outputs quiet");
        chk(io_s_out[i] == '0, "unused south outputs quiet");
      end
      @(posedge clk);
      if (!en) n_hold++;
      if (en && cnt == 2'd3) n_wrap++;
      cnt = cnt + 2'(en);
      @(negedge clk);
    end
    $display("mechanisms: carry=%0d hold=%0d wrap=%0d", n_carry, n_hold, n_wrap);
    if (n_carry == 0 || n_hold == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
