// tb_connection_block: self-checking test of the CLB input multiplexers (W = 8, I = 10).
// Random segment values and random selects; pin p must carry wire sel[p] of the segment on side
// p mod 4 (north, east, south, west).
module tb_connection_block;
  localparam int unsigned W = 8, I = 10, GS = 3;
  logic [W-1:0]    seg [4];
  logic [I*GS-1:0] cfg;
  logic [I-1:0]    pin;
  int checks = 0, failures = 0;

  connection_block #(.W(W), .I(I)) dut (
    .seg_n(seg[0]), .seg_e(seg[1]), .seg_s(seg[2]), .seg_w(seg[3]), .cfg(cfg), .pin(pin));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 300; r++) begin
      foreach (seg[s]) seg[s] = W'($urandom);
      cfg = {$urandom, $urandom};
      #1;
      for (int p = 0; p < I; p++) begin
        int sel;
        sel = (cfg >> (p * GS)) & 7;
        checks++;
        if (pin[p] !== seg[p % 4][sel]) begin
          failures++;
          $display("FAIL pin %0d sel %0d", p, sel);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
