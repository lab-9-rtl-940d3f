// register_en_tb: self-checking testbench for the load-enable register.
//
// Uses an 8-bit instance with reset value 0xA5 and a 1-bit instance (the flag
// registers' shape). Random reset, load and data are applied each cycle;
// after each rising edge the outputs are compared with a model kept in the
// testbench: reset value on reset, new data on load, otherwise unchanged.
module register_en_tb;
  logic       clk = 1'b0;
  logic       rst, load8, load1;
  logic [7:0] d8, q8, m8;
  logic       d1, q1, m1;

  int checks   = 0;
  int failures = 0;
  int loads    = 0;
  int holds    = 0;

  register_en #(.WIDTH(8), .RESET_VALUE(8'hA5)) dut8 (
    .clk(clk), .rst(rst), .load(load8), .d(d8), .q(q8));
  register_en #(.WIDTH(1)) dut1 (
    .clk(clk), .rst(rst), .load(load1), .d(d1), .q(q1));

  always #5 clk = ~clk;

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; load8 = 1'b0; load1 = 1'b0; d8 = '0; d1 = 1'b0;
    @(posedge clk); #1;
    m8 = 8'hA5; m1 = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      rst   = ($urandom % 50) == 0;
      load8 = 1'($urandom % 2);
      load1 = 1'($urandom % 2);
      d8    = 8'($urandom);
      d1    = 1'($urandom);
      @(posedge clk); #1;
      if (rst) begin
        m8 = 8'hA5; m1 = 1'b0;
      end else begin
        if (load8) begin m8 = d8; loads++; end else holds++;
        if (load1) m1 = d1;
      end
      checks++;
      if (q8 !== m8 || q1 !== m1) begin
        failures++;
        $display("mismatch cycle %0d: q8=%02h q1=%0d, expected %02h %0d", i, q8, q1, m8, m1);
      end
    end
    if (loads == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
