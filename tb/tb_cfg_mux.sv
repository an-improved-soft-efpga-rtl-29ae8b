// tb_cfg_mux: self-checking test of the configuration-controlled multiplexer.
// An 8:1 and a 14-input (4-bit select) instance get random data; every select value is tried
// and the output is compared with the selected data bit, or 0 for selects beyond the inputs.
// 16:1 and 32:1 instances, the other multiplexer sizes of the cell library, are checked too.
module tb_cfg_mux;
  logic [7:0]  in8;
  logic [2:0]  sel8;
  logic        out8;
  logic [13:0] in14;
  logic [3:0]  sel14;
  logic        out14;
  logic [15:0] in16;
  logic [3:0]  sel16;
  logic        out16;
  logic [31:0] in32;
  logic [4:0]  sel32;
  logic        out32;
  int checks = 0, failures = 0;

  cfg_mux #(.NIN(16)) dut16 (.in(in16), .sel(sel16), .out(out16));
  cfg_mux #(.NIN(32)) dut32 (.in(in32), .sel(sel32), .out(out32));

  cfg_mux #(.NIN(8))              dut8  (.in(in8),  .sel(sel8),  .out(out8));
  cfg_mux #(.NIN(14), .SEL_W(4))  dut14 (.in(in14), .sel(sel14), .out(out14));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 50; r++) begin
      in8  = 8'($urandom);
      in14 = 14'($urandom);
      for (int s = 0; s < 8; s++) begin
        sel8 = 3'(s);
        #1;
        checks++;
        if (out8 !== in8[s]) begin failures++; $display("FAIL 8:1 sel=%0d", s); end
      end
      for (int s = 0; s < 16; s++) begin
        logic exp;
        sel14 = 4'(s);
        #1;
        exp = (s < 14) ? in14[s] : 1'b0;
        checks++;
        if (out14 !== exp) begin failures++; $display("FAIL 14:1 sel=%0d", s); end
      end
    end
    for (int r = 0; r < 50; r++) begin
      in16 = 16'($urandom);
      in32 = $urandom;
      for (int s = 0; s < 32; s++) begin
        sel16 = 4'(s);
        sel32 = 5'(s);
        #1;
        checks += 2;
        if (out16 !== in16[s % 16]) begin failures++; $display("FAIL 16:1 sel=%0d", s); end
        if (out32 !== in32[s]) begin failures++; $display("FAIL 32:1 sel=%0d", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
