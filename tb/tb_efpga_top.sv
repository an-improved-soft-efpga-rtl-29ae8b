// tb_efpga_top: end-to-end test of the whole eFPGA at its default size (14 x 14 tiles).
//
// A bitstream is assembled here from the frame layout of efpga_pkg, streamed in through the
// configuration port, and the programmed fabric is then exercised from its boundary I/O:
//   Tile (1,1): a = west I/O row 1 track 0, b = track 1, c = track 2 reach the CLB over the
//     channel above it; d = track 3 turns south at the corner switch block and reaches it over
//     the channel on its left. BLE0 computes f = (a & b) ^ (c | d) combinationally, BLE1
//     registers f, BLE2/BLE3 form a free-running 2-bit counter through the local feedback.
//     All four leave on the east tracks of the tile's switch block and hop through every switch
//     block of row 1 to east I/O row 1.
//   Tile (DX,DY): e, f, g from north I/O column DX come down the channel right of the CLB; BLE0
//     is e & f & g, sent north to north I/O column DX track 0, and also west along row DY to
//     the left edge, where it turns south and runs down column 0 to south I/O column 0 track 0.
// The fabric is then reprogrammed with another function in tile (1,1) and checked again.
// Every boundary output not used by the circuit must stay 0. Counted mechanisms: configuration
// load (one word per cycle), quiet fabric before configuration, combinational LUT path,
// registered BLE path, counter wrap through the feedback path, long multi-hop routes with a turn,
// and reconfiguration; each must occur at least once.
module tb_efpga_top;
  import efpga_pkg::*;
  localparam int unsigned DX = DEF_DX, DY = DEF_DY, K = DEF_K, N = DEF_N, W = DEF_W, I = DEF_I;
  localparam int unsigned CW = DEF_CFG_W, HW = W / 2;
  localparam int unsigned FB = frame_bits(K, N, W, I), WORDS = frame_words(FB, CW);
  localparam int unsigned SS = sb_sel_w(N), GS = g_sel_w(W), MS = m_sel_w(I, N);
  localparam int unsigned OFF_M = (1 << MS) - 1;  // LUT input select that reads 0

  logic clk = 0, rst_n = 0, cfg_start = 0, cfg_valid = 0, cfg_ready, cfg_done;
  logic [CW-1:0] cfg_data = '0;
  logic [HW-1:0] io_n_in [DX+1], io_n_out [DX+1], io_s_in [DX+1], io_s_out [DX+1];
  logic [HW-1:0] io_e_in [DY+1], io_e_out [DY+1], io_w_in [DY+1], io_w_out [DY+1];

  logic [WORDS*CW-1:0] frame [DX+1][DY+1];
  int checks = 0, failures = 0;
  int n_cfg = 0, n_quiet = 0, n_comb = 0, n_reg = 0, n_wrap = 0, n_long = 0, n_reconf = 0;

  efpga_top dut (
    .clk(clk), .rst_n(rst_n), .cfg_start(cfg_start), .cfg_valid(cfg_valid), .cfg_data(cfg_data),
    .cfg_ready(cfg_ready), .cfg_done(cfg_done),
    .io_n_in(io_n_in), .io_n_out(io_n_out), .io_s_in(io_s_in), .io_s_out(io_s_out),
    .io_e_in(io_e_in), .io_e_out(io_e_out), .io_w_in(io_w_in), .io_w_out(io_w_out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- bitstream assembly ----
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

  // f_tt is the truth table of BLE0 in tile (1,1), inputs (a, b, c, d).
  task automatic build(logic [15:0] f_tt);
    foreach (frame[x, y]) frame[x][y] = '0;
    // tile (1,1) inputs from west I/O row 1
    for (int t = 0; t < 3; t++) set_sb(0, 1, SIDE_E, t, sel_from(SIDE_E, SIDE_W));
    set_sb(0, 1, SIDE_S, 3, sel_from(SIDE_S, SIDE_W));
    set_pin(1, 1, 0, 0);  // north pins 0, 4, 8 <- east-going wires 0, 1, 2
    set_pin(1, 1, 4, 1);
    set_pin(1, 1, 8, 2);
    set_pin(1, 1, 3, 3);  // west pin 3 <- south-going wire 3 of the left channel
    set_ble(1, 1, 0, f_tt, 0, 4, 8, 3, 1'b0);
    set_ble(1, 1, 1, 16'hAAAA, I + 0, OFF_M, OFF_M, OFF_M, 1'b1);
    set_ble(1, 1, 2, 16'h5555, I + 2, OFF_M, OFF_M, OFF_M, 1'b1);
    set_ble(1, 1, 3, 16'h6666, I + 3, I + 2, OFF_M, OFF_M, 1'b1);
    for (int t = 0; t < 4; t++) set_sb(1, 1, SIDE_E, t, SB_SEL_CLB + t);
    for (int x = 2; x <= DX; x++)
      for (int t = 0; t < 4; t++) set_sb(x, 1, SIDE_E, t, sel_from(SIDE_E, SIDE_W));
    // tile (DX,DY) inputs from north I/O column DX
    for (int t = 0; t < 3; t++) set_sb(DX, DY, SIDE_S, t, sel_from(SIDE_S, SIDE_N));
    set_pin(DX, DY, 1, 0);
    set_pin(DX, DY, 5, 1);
    set_pin(DX, DY, 9, 2);
    set_ble(DX, DY, 0, 16'h8080, 1, 5, 9, OFF_M, 1'b0);
    set_sb(DX, DY, SIDE_N, 0, SB_SEL_CLB + 0);
    set_sb(DX, DY, SIDE_W, 0, SB_SEL_CLB + 0);
    for (int x = 1; x < DX; x++) set_sb(x, DY, SIDE_W, 0, sel_from(SIDE_W, SIDE_E));
    set_sb(0, DY, SIDE_S, 0, sel_from(SIDE_S, SIDE_E));
    for (int y = 0; y < DY; y++) set_sb(0, y, SIDE_S, 0, sel_from(SIDE_S, SIDE_N));
  endtask

  task automatic load();
    int cycles;
    @(negedge clk);
    cfg_start = 1;
    @(negedge clk);
    cfg_start = 0;
    cycles = 0;
    for (int y = 0; y <= DY; y++)
      for (int x = 0; x <= DX; x++)
        for (int w = 0; w < WORDS; w++) begin
          cfg_valid = 1;
          cfg_data  = frame[x][y][w*CW +: CW];
          #1 chk(cfg_ready && !cfg_done, "ready while loading");
          @(negedge clk);
          cycles++;
        end
    cfg_valid = 0;
    #1 chk(cfg_done, "done after the last word");
    chk(cycles == (DX + 1) * (DY + 1) * WORDS, "one word per cycle");
    if (cfg_done) n_cfg++;
  endtask

  // Reference model of the programmed circuit.
  logic [15:0] f_tt;
  logic        ref_reg;
  logic [1:0]  ref_cnt;

  task automatic check_outputs(string phase);
    logic a, b, c, d, f, e3;
    {d, c, b, a} = {io_w_in[1][3], io_w_in[1][2], io_w_in[1][1], io_w_in[1][0]};
    f  = f_tt[{d, c, b, a}];
    e3 = &io_n_in[DX][2:0];
    chk(io_e_out[1] == {ref_cnt, ref_reg, f}, {phase, ": row 1 east outputs"});
    chk(io_n_out[DX] == HW'(e3), {phase, ": corner tile north output"});
    chk(io_s_out[0] == HW'(e3), {phase, ": long route to south I/O"});
    n_comb += 1;
    if (e3) n_long++;
    for (int j = 0; j <= DY; j++) begin
      if (j != 1) chk(io_e_out[j] == '0, "unused east outputs quiet");
      chk(io_w_out[j] == '0, "unused west outputs quiet");
    end
    for (int i = 0; i <= DX; i++) begin
      if (i != DX) chk(io_n_out[i] == '0, "unused north outputs quiet");
      if (i != 0)  chk(io_s_out[i] == '0, "unused south outputs quiet");
    end
  endtask

  task automatic run(int cycles, string phase);
    ref_reg = 0;
    ref_cnt = 0;
    for (int r = 0; r < cycles; r++) begin
      logic f;
      foreach (io_w_in[j]) io_w_in[j] = HW'($urandom);
      foreach (io_n_in[i]) io_n_in[i] = HW'($urandom);
      foreach (io_e_in[j]) io_e_in[j] = HW'($urandom);
      foreach (io_s_in[i]) io_s_in[i] = HW'($urandom);
      if (r % 4 == 0) io_n_in[DX] = '1;
      #1 check_outputs(phase);
      f = f_tt[io_w_in[1]];
      @(posedge clk);
      if (ref_reg != f) n_reg++;
      ref_reg = f;
      if (ref_cnt == 2'd3) n_wrap++;
      ref_cnt = ref_cnt + 1'b1;
      @(negedge clk);
    end
  endtask

  initial begin
    foreach (io_w_in[j]) io_w_in[j] = '1;
    foreach (io_e_in[j]) io_e_in[j] = '1;
    foreach (io_n_in[i]) io_n_in[i] = '1;
    foreach (io_s_in[i]) io_s_in[i] = '1;
    #12 rst_n = 1;
    @(negedge clk);
    // before configuration the fabric is quiet whatever the inputs
    begin
      logic any;
      any = 0;
      foreach (io_n_out[i]) any |= |io_n_out[i] | |io_s_out[i];
      foreach (io_e_out[j]) any |= |io_e_out[j] | |io_w_out[j];
      chk(!any && !cfg_done, "quiet before configuration");
      if (!any) n_quiet++;
    end
    f_tt = 16'h7778;  // (a & b) ^ (c | d)
    build(f_tt);
    load();
    run(60, "first program");
    f_tt = 16'h9669;  // reprogram: XNOR of all four
    build(f_tt);
    load();
    n_reconf++;
    run(40, "second program");

    $display("mechanisms: config=%0d quiet=%0d comb=%0d reg=%0d wrap=%0d long=%0d reconf=%0d",
             n_cfg, n_quiet, n_comb, n_reg, n_wrap, n_long, n_reconf);
    if (n_cfg == 0 || n_quiet == 0 || n_comb == 0 || n_reg == 0 || n_wrap == 0 || n_long == 0 ||
        n_reconf == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
