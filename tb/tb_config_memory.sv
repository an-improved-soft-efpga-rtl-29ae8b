// tb_config_memory: self-checking test of a tile's configuration store (210-bit frame, 32-bit
// words, the default tile). Reset must clear the frame; random words written at random
// addresses must appear at the right frame bits, out-of-range addresses must change nothing, and
// nothing changes while we is low.
module tb_config_memory;
  localparam int unsigned FB = 210, CW = 32, WORDS = 7;
  logic clk = 0, rst_n = 0, we = 0;
  logic [2:0]    addr = '0;
  logic [CW-1:0] wdata = '0;
  logic [FB-1:0] frame;
  logic [WORDS*CW-1:0] model;
  int checks = 0, failures = 0;

  config_memory #(.FRAME_BITS(FB), .CFG_W(CW)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .addr(addr), .wdata(wdata), .frame(frame));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    #12 rst_n = 1;
    checks++;
    if (frame !== '0) begin failures++; $display("FAIL reset"); end
    for (int r = 0; r < 200; r++) begin
      @(negedge clk);
      we    = ($urandom % 4) != 0;
      addr  = 3'($urandom);
      wdata = $urandom;
      @(posedge clk);
      if (we && addr < WORDS) model[addr*CW +: CW] = wdata;
      #1;
      checks++;
      if (frame !== model[FB-1:0]) begin
        failures++;
        $display("FAIL write r=%0d addr=%0d", r, addr);
      end
    end
    rst_n = 0;
    #1 checks++;
    if (frame !== '0) begin failures++; $display("FAIL second reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
