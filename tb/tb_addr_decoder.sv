// tb_addr_decoder: self-checking test of the one-hot row/column decoder (15 outputs, the
// default array). Every address, in and out of range, with the enable low and high.
module tb_addr_decoder;
  localparam int unsigned NOUT = 15;
  logic        en;
  logic [3:0]  addr;
  logic [14:0] sel;
  int checks = 0, failures = 0;

  addr_decoder #(.NOUT(NOUT)) dut (.en(en), .addr(addr), .sel(sel));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 16; a++) begin
        logic [14:0] exp;
        en = 1'(e);
        addr = 4'(a);
        #1;
        exp = (e == 1 && a < NOUT) ? (15'd1 << a) : 15'd0;
        checks++;
        if (sel !== exp) begin
          failures++;
          $display("FAIL en=%0d addr=%0d sel=%b", e, a, sel);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
