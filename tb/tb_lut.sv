// tb_lut: self-checking test of the K-input lookup table.
// Random truth tables are applied and every input combination is compared with the bit of the
// table that the input value indexes, extracted here by a shift. The 4-input default is tested
// together with 3- and 5-input instances, the other LUT sizes of the standard-cell library.
module tb_lut;
  localparam int unsigned K = 4;
  logic [(1<<K)-1:0] cfg;
  logic [K-1:0]      in;
  logic              out;
  int checks = 0, failures = 0;

  lut #(.K(K)) dut (.cfg(cfg), .in(in), .out(out));

  logic [7:0]  cfg3;
  logic [2:0]  in3;
  logic        out3;
  logic [31:0] cfg5;
  logic [4:0]  in5;
  logic        out5;
  lut #(.K(3)) dut3 (.cfg(cfg3), .in(in3), .out(out3));
  lut #(.K(5)) dut5 (.cfg(cfg5), .in(in5), .out(out5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      cfg = (r == 0) ? 16'h8000 : (r == 1) ? 16'h6996 : 16'($urandom);
      for (int v = 0; v < (1 << K); v++) begin
        in = K'(v);
        #1;
        checks++;
        if (out !== ((cfg >> v) & 1'b1)) begin
          failures++;
          $display("FAIL cfg=%h in=%0d out=%b", cfg, v, out);
        end
      end
    end
    for (int r = 0; r < 20; r++) begin
      cfg3 = 8'($urandom);
      cfg5 = $urandom;
      for (int v = 0; v < 32; v++) begin
        in3 = 3'(v);
        in5 = 5'(v);
        #1;
        checks += 2;
        if (out3 !== ((cfg3 >> (v % 8)) & 1'b1)) begin failures++; $display("FAIL 3-LUT"); end
        if (out5 !== ((cfg5 >> v) & 1'b1)) begin failures++; $display("FAIL 5-LUT"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
