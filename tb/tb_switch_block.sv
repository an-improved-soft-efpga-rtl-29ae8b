// tb_switch_block: self-checking test of the switch multiplexers (W = 8, N = 4).
// For random arriving wires, CLB outputs and selects, every leaving wire (side s, track t) is
// compared with: 0 for select 0, the track-t wire of side (s+sel) mod 4 for selects 1..3 and
// CLB output sel-4 for selects 4..7.
module tb_switch_block;
  localparam int unsigned W = 8, N = 4, HW = 4, SS = 3;
  logic [HW-1:0]        sb_in  [4];
  logic [HW-1:0]        sb_out [4];
  logic [N-1:0]         clb_out;
  logic [4*HW*SS-1:0]   cfg;
  int checks = 0, failures = 0;
  int seen [8];

  switch_block #(.W(W), .N(N)) dut (.sb_in(sb_in), .clb_out(clb_out), .cfg(cfg), .sb_out(sb_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int r = 0; r < 300; r++) begin
      foreach (sb_in[s]) sb_in[s] = HW'($urandom);
      clb_out = N'($urandom);
      cfg = {$urandom, $urandom};
      #1;
      for (int s = 0; s < 4; s++)
        for (int t = 0; t < HW; t++) begin
          int sel;
          logic exp;
          sel = int'((cfg >> ((s * HW + t) * SS)) & 7);
          seen[sel]++;
          if (sel == 0)      exp = 1'b0;
          else if (sel < 4)  exp = sb_in[(s + sel) % 4][t];
          else               exp = clb_out[sel - 4];
          checks++;
          if (sb_out[s][t] !== exp) begin
            failures++;
            $display("FAIL side %0d track %0d sel %0d", s, t, sel);
          end
        end
    end
    foreach (seen[i]) if (seen[i] == 0) begin failures++; $display("select %0d never used", i); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
