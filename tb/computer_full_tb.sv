// computer_full_tb: the computer at its default parameters running the
// running-light program it holds after configuration.
//
// After reset the LEDs (ACCA) must step through 0000_0001, 0000_0010, ...,
// 1000_0000 and then start again at 0000_0001, never showing zero. The
// testbench follows three full rounds (24 LED patterns) and checks each
// pattern and how many clock cycles it lasts: 0000_0001 lasts 11 cycles
// (CMPA, JEQ not taken, LSLA: 5 + 3 + 3), every other pattern 14 (JMP, CMPA,
// JEQ, then LSLA or LDAA_IMM: 3 + 5 + 3 + 3). It counts the wraps back to the
// start of the program and fails unless there were three.
module computer_full_tb;
  import computer_pkg::*;

  logic  clk = 1'b0;
  logic  rst;
  word_t leds, acca;
  addr_t pc;
  logic  c_flag, z_flag, fetch;

  int checks   = 0;
  int failures = 0;
  int wraps    = 0;

  computer dut (
    .clk(clk), .rst(rst), .leds(leds), .acca(acca), .pc(pc),
    .c_flag(c_flag), .z_flag(z_flag), .fetch(fetch));

  always #5 clk = ~clk;

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t prev;
    int    expect_val, held;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    prev = leds;  // zero after reset
    expect_val = 1;
    held = 0;
    for (int k = 0; k < 25; ) begin
      @(posedge clk); #1;
      held++;
      checks++;
      if (leds == 8'h00 && k > 0) begin
        failures++;
        $display("LEDs all zero");
      end
      if (leds != prev) begin
        checks += 2;
        if (int'(leds) != expect_val) begin
          failures++;
          $display("pattern %0d: leds=%08b, expected %08b", k, leds, 8'(expect_val));
        end
        if (k > 1 && held != ((prev == 8'h01) ? 11 : 14)) begin
          failures++;
          $display("pattern %0d lasted %0d cycles", k - 1, held);
        end
        if (prev == 8'h80 && leds == 8'h01) wraps++;
        expect_val = (expect_val == 128) ? 1 : expect_val * 2;
        prev = leds;
        held = 0;
        k++;
      end
    end
    checks++;
    if (wraps != 3) begin
      failures++;
      $display("%0d wraps to the start, expected 3", wraps);
    end
    $display("running light: %0d wraps", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
