// tb_config_fsm: self-checking test of the configuration state machine (3 rows, 4 columns,
// 3 words per tile). Words are offered with random gaps; each accepted word must carry the next
// (row, column, word) address in word-column-row order, done must rise exactly one cycle after
// the last word and no word may be taken outside a load. A second start reloads.
module tb_config_fsm;
  localparam int unsigned ROWS = 3, COLS = 4, WORDS = 3, CW = 32;
  logic clk = 0, rst_n = 0, start = 0, valid = 0;
  logic [CW-1:0] data = '0;
  logic ready, we, done;
  logic [1:0] row, col, word;
  logic [CW-1:0] wdata;
  int checks = 0, failures = 0;

  config_fsm #(.ROWS(ROWS), .COLS(COLS), .WORDS(WORDS), .CFG_W(CW)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .valid(valid), .data(data), .ready(ready),
    .row(row), .col(col), .word(word), .wdata(wdata), .we(we), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic load(int gap_pct);
    int n, cycles;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    n = 0;
    cycles = 0;
    while (n < ROWS * COLS * WORDS) begin
      valid = ($urandom % 100) >= gap_pct;
      data  = $urandom;
      #1;
      chk(ready && !done, "ready during load");
      chk(we == valid, "we follows valid");
      if (valid) begin
        chk(row == 2'(n / (COLS * WORDS)), "row address");
        chk(col == 2'((n / WORDS) % COLS), "column address");
        chk(word == 2'(n % WORDS), "word address");
        chk(wdata == data, "data passed");
        n++;
      end
      cycles++;
      @(negedge clk);
    end
    valid = 0;
    #1 chk(done && !ready && !we, "done after last word");
    if (gap_pct == 0) chk(cycles == ROWS * COLS * WORDS, "one word per cycle");
  endtask

  initial begin
    #12 rst_n = 1;
    @(negedge clk);
    valid = 1;
    #1 chk(!ready && !we && !done, "idle ignores words");
    valid = 0;
    load(0);
    load(40);
    repeat (3) @(negedge clk);
    #1 chk(done, "done holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
