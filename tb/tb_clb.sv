// tb_clb: self-checking test of the cluster (K = 4, N = 4, I = 10).
// The cluster is configured as a small circuit and compared cycle by cycle with a model:
//   BLE0 combinational: AND of pins 0..3
//   BLE1 registered:    XOR of pin 4 and BLE0 (through the feedback path)
//   BLE2 registered:    toggles every cycle (its own output fed back, inverted)
//   BLE3 combinational: pin 9 when BLE2 is 1, else pin 8 (a 2:1 multiplexer from a LUT)
// Before en is raised every output must be 0.
module tb_clb;
  import efpga_pkg::*;
  localparam int unsigned K = 4, N = 4, I = 10;
  localparam int unsigned MS = m_sel_w(I, N), BB = ble_bits(K, I, N);
  logic clk = 0, rst_n = 0, en = 0;
  logic [N*BB-1:0] cfg;
  logic [I-1:0]    pin_in;
  logic [N-1:0]    out;
  int checks = 0, failures = 0;

  clb #(.K(K), .N(N), .I(I)) dut (.clk(clk), .rst_n(rst_n), .en(en), .cfg(cfg),
                                  .pin_in(pin_in), .out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Unused LUT inputs select an out-of-range value and read 0.
  function automatic logic [BB-1:0] ble_cfg(logic [15:0] tt, int s0, int s1, int s2, int s3,
                                            logic ff);
    logic [BB-1:0] c;
    c = '0;
    c[15:0] = tt;
    c[16 + 0*MS +: MS] = MS'(s0);
    c[16 + 1*MS +: MS] = MS'(s1);
    c[16 + 2*MS +: MS] = MS'(s2);
    c[16 + 3*MS +: MS] = MS'(s3);
    c[16 + 4*MS] = ff;
    return c;
  endfunction

  localparam int OFF = 15;  // select that reads 0

  initial begin
    logic b1, b2;
    logic exp0, exp3;
    pin_in = '0;
    cfg = {ble_cfg(16'hCACA, 8, 9, I + 2, OFF, 1'b0),    // in0=p8 in1=p9 in2=ble2: in2?in1:in0
           ble_cfg(16'h5555, I + 2, OFF, OFF, OFF, 1'b1), // NOT in0
           ble_cfg(16'h6666, 4, I + 0, OFF, OFF, 1'b1),   // in0 ^ in1
           ble_cfg(16'h8000, 0, 1, 2, 3, 1'b0)};          // AND of four
    #12 rst_n = 1;
    @(negedge clk);
    pin_in = '1;
    #1 checks++;
    if (out !== '0) begin failures++; $display("FAIL outputs not 0 while disabled"); end
    en = 1;
    b1 = 0; b2 = 0;
    for (int r = 0; r < 200; r++) begin
      pin_in = I'($urandom);
      if (r % 3 == 0) pin_in[3:0] = 4'hF;
      #1;
      exp0 = &pin_in[3:0];
      exp3 = b2 ? pin_in[9] : pin_in[8];
      checks++;
      if (out !== {exp3, b2, b1, exp0}) begin
        failures++;
        $display("FAIL r=%0d out=%b exp=%b", r, out, {exp3, b2, b1, exp0});
      end
      @(posedge clk);
      b1 = pin_in[4] ^ exp0;
      b2 = ~b2;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
