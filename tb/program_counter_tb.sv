// program_counter_tb: self-checking testbench for the program counter.
//
// Uses reset value 0x10. Random reset, load, increment and jump targets are
// applied each cycle and the count compared with a model after every edge:
// reset value on reset, target on load (load wins over increment), plus one
// (modulo 256) on increment. Also checks the wrap from 0xFF to 0x00.
module program_counter_tb;
  logic       clk = 1'b0;
  logic       rst, load, inc;
  logic [7:0] d, q;
  int         m;

  int checks   = 0;
  int failures = 0;
  int wraps    = 0;

  program_counter #(.WIDTH(8), .RESET_VALUE(8'h10)) dut (
    .clk(clk), .rst(rst), .load(load), .inc(inc), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #500_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_check();
    @(posedge clk); #1;
    if (rst)       m = 16;
    else if (load) m = int'(d);
    else if (inc) begin
      if (m == 255) wraps++;
      m = (m + 1) % 256;
    end
    checks++;
    if (int'(q) != m) begin
      failures++;
      $display("mismatch: rst=%0d load=%0d inc=%0d d=%02h q=%02h expected %02h",
               rst, load, inc, d, q, m);
    end
  endtask

  initial begin
    rst = 1'b1; load = 1'b0; inc = 1'b0; d = '0;
    step_check();
    for (int i = 0; i < 5000; i++) begin
      rst  = ($urandom % 100) == 0;
      load = ($urandom % 8) == 0;
      inc  = ($urandom % 4) != 0;
      d    = 8'($urandom);
      step_check();
    end
    // count through the wrap
    rst = 1'b0; load = 1'b1; inc = 1'b0; d = 8'hFE;
    step_check();
    load = 1'b0; inc = 1'b1;
    repeat (4) step_check();
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
