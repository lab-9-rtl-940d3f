// addr_mux_tb: self-checking testbench for the memory address multiplexer.
//
// Drives random PC and MAR values with both select settings and checks that
// the address is the selected source.
module addr_mux_tb;
  import computer_pkg::*;

  addr_t     pc, mar, addr;
  addr_sel_e sel;

  int checks   = 0;
  int failures = 0;

  addr_mux dut (.pc(pc), .mar(mar), .sel(sel), .addr(addr));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      pc  = addr_t'($urandom);
      mar = addr_t'($urandom);
      sel = (i % 2 == 0) ? SEL_PC : SEL_MAR;
      if (i % 7 == 3) mar = ~pc;
      #1;
      checks++;
      if (addr != ((sel == SEL_MAR) ? mar : pc)) begin
        failures++;
        $display("mismatch sel=%0d pc=%02h mar=%02h addr=%02h", sel, pc, mar, addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
