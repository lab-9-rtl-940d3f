// mem_block_tb: self-checking testbench for the memory block.
//
// First reads all 256 bytes and compares them with the running-light program
// image, written out here byte by byte (only the listed bytes are non-zero).
// Then runs random reads and writes against a model array, checking that q
// shows the addressed byte one cycle after the address (the byte as it was
// before a write in that same cycle).
module mem_block_tb;
  import computer_pkg::*;

  logic  clock = 1'b0;
  addr_t address;
  word_t data, q;
  logic  wren;
  word_t model [256];

  int checks   = 0;
  int failures = 0;
  int writes   = 0;

  mem_block dut (.clock(clock), .address(address), .data(data), .wren(wren), .q(q));

  always #5 clock = ~clock;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t expect_q;
    foreach (model[i]) model[i] = 8'h00;
    model[8'h00] = 8'h02; model[8'h01] = 8'h01;
    model[8'h02] = 8'h08; model[8'h03] = 8'h20;
    model[8'h04] = 8'h11; model[8'h05] = 8'h00;
    model[8'h06] = 8'h0B;
    model[8'h07] = 8'h0E; model[8'h08] = 8'h02;
    model[8'h20] = 8'h80;

    wren = 1'b0; data = '0;
    for (int i = 0; i < 256; i++) begin
      address = addr_t'(i);
      @(posedge clock); #1;
      checks++;
      if (q !== model[i]) begin
        failures++;
        $display("initial image: byte %02h is %02h, expected %02h", i, q, model[i]);
      end
    end

    for (int i = 0; i < 4000; i++) begin
      address = addr_t'($urandom);
      wren    = ($urandom % 3) == 0;
      data    = word_t'($urandom);
      expect_q = model[address];
      if (wren) begin
        model[address] = data;
        writes++;
      end
      @(posedge clock); #1;
      checks++;
      if (q !== expect_q) begin
        failures++;
        $display("address %02h wren=%0d: q=%02h, expected %02h", address, wren, q, expect_q);
      end
    end
    if (writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
