// tb_efpga_edge_tile: self-checking test of an edge tile (default sizes). Random switch-block
// selects are loaded through the configuration port, followed by random data in the frame words
// that belong to the absent CLB, which must be ignored. Every leaving wire is compared with a
// model: off and CLB-output selects give 0, selects 1..3 pass the same track of side
// (s+sel) mod 4.
module tb_efpga_edge_tile;
  import efpga_pkg::*;
  localparam int unsigned K = DEF_K, N = DEF_N, W = DEF_W, I = DEF_I, CW = DEF_CFG_W;
  localparam int unsigned HW = W / 2, SS = sb_sel_w(N);
  localparam int unsigned FB = frame_bits(K, N, W, I), WORDS = frame_words(FB, CW);
  localparam int unsigned SBB = sb_bits(W, N);

  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [2:0]    cfg_addr = '0;
  logic [CW-1:0] cfg_wdata = '0;
  logic [HW-1:0] sb_in [4];
  logic [HW-1:0] sb_out [4];
  logic [WORDS*CW-1:0] frame;
  int checks = 0, failures = 0;

  efpga_edge_tile dut (.clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
                       .cfg_wdata(cfg_wdata), .sb_in(sb_in), .sb_out(sb_out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int cfgn = 0; cfgn < 10; cfgn++) begin
      for (int w = 0; w < WORDS; w++) frame[w*CW +: CW] = $urandom;
      for (int w = 0; w < WORDS; w++) begin
        @(negedge clk);
        cfg_we = 1; cfg_addr = 3'(w); cfg_wdata = frame[w*CW +: CW];
      end
      @(negedge clk);
      cfg_we = 0;
      for (int r = 0; r < 20; r++) begin
        foreach (sb_in[s]) sb_in[s] = HW'($urandom);
        #1;
        for (int s = 0; s < 4; s++)
          for (int t = 0; t < HW; t++) begin
            int sel;
            logic exp;
            sel = int'(frame[(s*HW + t)*SS +: SS]);
            exp = (sel >= 1 && sel <= 3) ? sb_in[(s + sel) % 4][t] : 1'b0;
            checks++;
            if (sb_out[s][t] !== exp) begin
              failures++;
              $display("FAIL cfg %0d side %0d track %0d sel %0d", cfgn, s, t, sel);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
