// tb_ble: self-checking test of the basic logic element.
// With the combinational output selected, the output must follow the truth table at once; with
// the registered output selected, it must show the LUT value of the previous clock edge. While
// en is low the output and the flip-flop must stay 0.
module tb_ble;
  localparam int unsigned K = 4;
  logic clk = 0, rst_n = 0, en = 0, cfg_ff = 0;
  logic [15:0] cfg_lut;
  logic [3:0]  in;
  logic        out;
  int checks = 0, failures = 0;

  ble #(.K(K)) dut (.clk(clk), .rst_n(rst_n), .en(en), .cfg_lut(cfg_lut), .cfg_ff(cfg_ff),
                    .in(in), .out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(logic e, string what);
    checks++;
    if (out !== e) begin failures++; $display("FAIL %s: out=%b exp=%b", what, out, e); end
  endtask

  initial begin
    logic prev;
    cfg_lut = 16'h6996;  // 4-input parity
    in = 4'b0001;
    #12 rst_n = 1;
    // disabled: everything 0
    repeat (2) @(posedge clk);
    #1 expect_out(1'b0, "disabled comb");
    cfg_ff = 1;
    #1 expect_out(1'b0, "disabled reg");
    // combinational
    en = 1; cfg_ff = 0;
    for (int r = 0; r < 40; r++) begin
      in = 4'($urandom);
      #1 expect_out(^in, "comb");
      @(posedge clk);
      @(negedge clk);
    end
    // registered
    cfg_ff = 1;
    @(negedge clk);
    for (int r = 0; r < 40; r++) begin
      in = 4'($urandom);
      prev = ^in;
      @(posedge clk);
      #1 expect_out(prev, "registered");
      in = ~in;  // changing inputs must not reach the registered output
      #1 expect_out(prev, "registered hold");
      @(negedge clk);
    end
    // disabling clears the flip-flop
    in = 4'b0001;
    @(posedge clk); #1;
    en = 0;
    @(posedge clk); #1;
    en = 1;
    #1 expect_out(1'b0, "cleared by en");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
