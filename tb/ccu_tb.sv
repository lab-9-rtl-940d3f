// ccu_tb: self-checking testbench for the control unit.
//
// For every opcode of the instruction set, two unused opcodes, and all four
// combinations of the C and Z flags, the testbench resets the control unit,
// plays the instruction register (IR takes the opcode when the control unit
// asks for it in the second cycle) and runs the instruction until the
// control unit is back in its fetch state. It totals what the control word
// did over the instruction (cycles, PC increments, jump loads, MAR, ACCA and
// flag loads, memory writes, cycles addressed through MAR) and compares the
// totals, and the ALU operation used for ACCA and the flags, with a table
// derived from the instruction set: which flags change, whether a jump is
// taken, how many bytes the instruction occupies, and the cycle count of
// 3, 4 or 5 cycles.
module ccu_tb;
  import computer_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  word_t      ir;
  logic       c_flag, z_flag;
  ctrl_t      ctrl;
  ccu_state_e state;

  int checks   = 0;
  int failures = 0;

  ccu dut (.clk(clk), .rst(rst), .ir(ir), .c_flag(c_flag), .z_flag(z_flag),
           .ctrl(ctrl), .state(state));

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int      cycles;
    int      pc_inc;
    int      pc_load;
    int      mar_load;
    int      acca_load;
    int      c_load;
    int      z_load;
    int      wren;
    int      mar_cycles;
    alu_op_e alu;       // op in the cycle that loads ACCA or a flag
  } summary_t;

  task automatic check_eq(string what, int opc, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("opcode %02h: %s = %0d, expected %0d", opc, what, got, exp);
    end
  endtask

  function automatic summary_t expected(int opc, logic c, logic z);
    summary_t e;
    e = '{cycles: 3, pc_inc: 1, pc_load: 0, mar_load: 0, acca_load: 0,
          c_load: 0, z_load: 0, wren: 0, mar_cycles: 0, alu: ALU_PASS_B};
    case (opc)
      32'h01, 32'h03, 32'h04, 32'h05, 32'h06, 32'h07, 32'h08: begin  // memory operand
        e.cycles = (opc == 32'h03) ? 4 : 5;
        e.pc_inc = 2; e.mar_load = 1; e.mar_cycles = 1; e.z_load = 1;
        e.acca_load = (opc == 32'h03 || opc == 32'h08) ? 0 : 1;
        e.c_load    = (opc == 32'h04 || opc == 32'h05 || opc == 32'h08) ? 1 : 0;
        e.wren      = (opc == 32'h03) ? 1 : 0;
        e.alu = (opc == 32'h03) ? ALU_PASS_A :
                (opc == 32'h04) ? ALU_ADD :
                (opc == 32'h05 || opc == 32'h08) ? ALU_SUB :
                (opc == 32'h06) ? ALU_AND :
                (opc == 32'h07) ? ALU_OR : ALU_PASS_B;
      end
      32'h02: begin e.pc_inc = 2; e.acca_load = 1; e.z_load = 1; e.alu = ALU_PASS_B; end
      32'h09: begin e.acca_load = 1; e.c_load = 1; e.z_load = 1; e.alu = ALU_COM; end
      32'h0A: begin e.acca_load = 1; e.z_load = 1; e.alu = ALU_INC; end
      32'h0B: begin e.acca_load = 1; e.c_load = 1; e.z_load = 1; e.alu = ALU_LSL; end
      32'h0C: begin e.acca_load = 1; e.c_load = 1; e.z_load = 1; e.alu = ALU_LSR; end
      32'h0D: begin e.acca_load = 1; e.c_load = 1; e.z_load = 1; e.alu = ALU_ASR; end
      32'h0E, 32'h0F, 32'h10, 32'h11: begin
        bit taken;
        taken = (opc == 32'h0E) || (opc == 32'h0F && c) ||
                (opc == 32'h10 && !c) || (opc == 32'h11 && z);
        e.pc_load = taken ? 1 : 0;
        e.pc_inc  = taken ? 1 : 2;
      end
      default: ;  // NOP and unused opcodes: one byte, nothing changes
    endcase
    return e;
  endfunction

  initial begin
    int opcodes [20];
    for (int i = 0; i < 18; i++) opcodes[i] = i;
    opcodes[18] = 32'h12;
    opcodes[19] = 32'hFF;
    rst = 1'b1; ir = 8'hEE; c_flag = 1'b0; z_flag = 1'b0;
    foreach (opcodes[k]) begin
      for (int f = 0; f < 4; f++) begin
        summary_t g, e;
        int opc;
        opc = opcodes[k];
        g = '{cycles: 0, pc_inc: 0, pc_load: 0, mar_load: 0, acca_load: 0,
              c_load: 0, z_load: 0, wren: 0, mar_cycles: 0, alu: ALU_PASS_B};
        c_flag = f[0];
        z_flag = f[1];
        rst = 1'b1;
        ir  = 8'hEE;
        @(posedge clk); #1;
        rst = 1'b0;
        checks++;
        if (state != ST_FETCH) begin failures++; $display("not in fetch after reset"); end
        do begin
          g.cycles++;
          if (g.cycles == 2 && !ctrl.ir_load) begin
            failures++; $display("opcode %02h: IR not loaded in cycle 2", opc);
          end
          if (g.cycles != 2 && ctrl.ir_load) begin
            failures++; $display("opcode %02h: IR loaded in cycle %0d", opc, g.cycles);
          end
          g.pc_inc     += int'(ctrl.pc_inc);
          g.pc_load    += int'(ctrl.pc_load);
          g.mar_load   += int'(ctrl.mar_load);
          g.acca_load  += int'(ctrl.acca_load);
          g.c_load     += int'(ctrl.c_load);
          g.z_load     += int'(ctrl.z_load);
          g.wren       += int'(ctrl.mem_wren);
          g.mar_cycles += (ctrl.addr_sel == SEL_MAR) ? 1 : 0;
          if (ctrl.acca_load || ctrl.c_load || ctrl.z_load) g.alu = ctrl.alu_op;
          @(posedge clk);
          if (g.cycles == 2) ir = word_t'(opc);
          #1;
        end while (state != ST_FETCH && g.cycles < 20);
        e = expected(opc, c_flag, z_flag);
        check_eq("cycles",      opc, g.cycles,     e.cycles);
        check_eq("pc_inc",      opc, g.pc_inc,     e.pc_inc);
        check_eq("pc_load",     opc, g.pc_load,    e.pc_load);
        check_eq("mar_load",    opc, g.mar_load,   e.mar_load);
        check_eq("acca_load",   opc, g.acca_load,  e.acca_load);
        check_eq("c_load",      opc, g.c_load,     e.c_load);
        check_eq("z_load",      opc, g.z_load,     e.z_load);
        check_eq("mem_wren",    opc, g.wren,       e.wren);
        check_eq("mar_cycles",  opc, g.mar_cycles, e.mar_cycles);
        if (e.acca_load + e.c_load + e.z_load > 0)
          check_eq("alu_op", opc, int'(g.alu), int'(e.alu));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
