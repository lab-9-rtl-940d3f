// computer_tb: end-to-end self-checking testbench for the computer.
//
// Sixteen computers run side by side, each from its own memory image: a directed
// program that walks through every instruction, every branch both taken and
// not taken, a carry, a borrow and a store followed by a load of the same
// byte; and fifteen pseudo-random images (xorshift generator, mostly valid
// opcodes, some unused ones, jumps into the code, data mostly apart). Next to each
// computer runs an instruction-level model of the instruction set, written
// here from the instruction table, with its own copy of memory. At the start
// of every instruction (fetch high) the computer's PC, ACCA, C and Z are
// compared with the model's, and the cycles the previous instruction took
// with 3, 4 (STAA) or 5 (other memory operands). Stores are checked through
// the later loads of the same bytes, which the model tracks.
//
// The testbench counts how often each mechanism happened (each opcode, each
// conditional jump taken and not taken, carry out of ADDA, borrow of SUBA,
// a load of a byte stored earlier, an unused opcode) and counts a failure for
// each that never did.
module computer_tb;
  import computer_pkg::*;

  localparam int NPROG  = 16;
  localparam int NINSTR = 1500;

  // Directed program; the comments give address, instruction and effect.
  function automatic mem_image_t directed_image();
    mem_image_t m;
    logic [7:0] p [50] = '{
      8'h02, 8'h05,  // 00 LDAA_IMM #05
      8'h04, 8'h80,  // 02 ADDA 80      05+FE = 03, C=1
      8'h0F, 8'h08,  // 04 JCS 08       taken
      8'h00, 8'h00,  // 06 (skipped)
      8'h10, 8'h30,  // 08 JCC 30       not taken
      8'h05, 8'h81,  // 0A SUBA 81      03-04 = FF, borrow
      8'h03, 8'h90,  // 0C STAA 90
      8'h01, 8'h80,  // 0E LDAA 80      FE
      8'h06, 8'h82,  // 10 ANDA 82      0E
      8'h07, 8'h83,  // 12 ORAA 83      3E
      8'h08, 8'h84,  // 14 CMPA 84      Z=1
      8'h11, 8'h1A,  // 16 JEQ 1A       taken
      8'h00, 8'h00,  // 18 (skipped)
      8'h09,         // 1A COMA         C1, C=1
      8'h0A,         // 1B INCA         C2
      8'h0B,         // 1C LSLA         84, C=1
      8'h0C,         // 1D LSRA         42, C=0
      8'h0D,         // 1E ASRA         21, C=1
      8'h10, 8'h23,  // 1F JCC 23       not taken (C=1)
      8'h0C,         // 21 LSRA         10, C=0
      8'h00,         // 22 NOP
      8'h10, 8'h25,  // 23 JCC 25       taken
      8'h11, 8'h00,  // 25 JEQ 00       not taken
      8'h0F, 8'h00,  // 27 JCS 00       not taken
      8'h01, 8'h90,  // 29 LDAA 90      FF, stored above
      8'h0A,         // 2B INCA         00, Z=1
      8'h02, 8'h80,  // 2C LDAA_IMM #80
      8'h0D,         // 2E ASRA         C0
      8'h12,         // 2F unused opcode
      8'h0E, 8'h00   // 30 JMP 00
    };
    m = '0;
    foreach (p[i]) m[i] = p[i];
    m[8'h80] = 8'hFE;
    m[8'h81] = 8'h04;
    m[8'h82] = 8'h0F;
    m[8'h83] = 8'h30;
    m[8'h84] = 8'h3E;
    return m;
  endfunction

  // Pseudo-random image. 0x00-0x9F holds a random instruction stream: mostly
  // valid opcodes, a few unused ones; jump targets inside that region, data
  // addresses mostly in 0xA0-0xFF (sometimes into the code, which then
  // changes itself). 0xA0-0xFF holds random data.
  function automatic mem_image_t random_image(int unsigned seed);
    mem_image_t  m;
    int unsigned s;
    int          i, op;
    s = seed;
    i = 0;
    while (i < 256) begin
      s ^= s << 13; s ^= s >> 17; s ^= s << 5;
      if (i >= 160) begin
        m[i] = 8'(s >> 16);
        i++;
      end else begin
        op = ((s >> 24) % 16 == 0) ? 18 + int'((s >> 8) % 200) : int'((s >> 8) % 18);
        m[i] = 8'(op);
        if (i + 1 < 160) begin
          case (op)
            1, 3, 4, 5, 6, 7, 8:
              m[i + 1] = ((s >> 4) % 8 == 0) ? 8'((s >> 12) % 160)
                                              : 8'(160 + (s >> 12) % 96);
            14, 15, 16, 17: m[i + 1] = 8'((s >> 12) % 160);
            2:              m[i + 1] = 8'(s >> 12);
            default:        ;
          endcase
          i += (op <= 17) ? int'(instr_bytes(opcode_e'(op))) : 1;
        end else begin
          i++;
        end
      end
    end
    return m;
  endfunction

  function automatic mem_image_t image(int g);
    return (g == 0) ? directed_image() : random_image(32'h1234_5678 + 32'(g) * 32'h9E37_79B9);
  endfunction

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int done     = 0;

  // mechanism counters
  int op_seen [19];          // 0x00..0x11 and [18] = unused opcode
  int taken [3];             // JCS, JCC, JEQ
  int not_taken [3];
  int add_carry  = 0;
  int sub_borrow = 0;
  int load_after_store = 0;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NPROG; g++) begin : gen
    word_t leds, acca;
    addr_t pc;
    logic  c_flag, z_flag, fetch;

    computer #(.INIT(image(g))) dut (
      .clk(clk), .rst(rst), .leds(leds), .acca(acca), .pc(pc),
      .c_flag(c_flag), .z_flag(z_flag), .fetch(fetch));

    // reference state
    int  m_acc, m_pc, m_c, m_z;
    int  m_mem [256];
    bit  m_stored [256];
    int  exp_cycles;
    int  cycles;
    int  n;

    function automatic int rd(int a);
      return m_mem[a % 256];
    endfunction

    // Execute one instruction on the reference; returns its cycle count.
    task automatic ref_step(output int cyc);
      int op, opnd, v;
      op   = rd(m_pc);
      opnd = rd(m_pc + 1);
      m_pc = (m_pc + 1) % 256;
      cyc  = 3;
      op_seen[(op <= 17) ? op : 18]++;
      case (op)
        1, 3, 4, 5, 6, 7, 8: begin
          m_pc = (m_pc + 1) % 256;
          v    = rd(opnd);
          cyc  = (op == 3) ? 4 : 5;
          case (op)
            1: begin m_acc = v; if (m_stored[opnd]) load_after_store++; end
            3: begin m_mem[opnd] = m_acc; m_stored[opnd] = 1'b1; end
            4: begin
              m_c = (m_acc + v > 255) ? 1 : 0;
              if (m_c == 1) add_carry++;
              m_acc = (m_acc + v) % 256;
            end
            5: begin
              m_c = (m_acc < v) ? 1 : 0;
              if (m_c == 1) sub_borrow++;
              m_acc = (m_acc - v + 256) % 256;
            end
            6: m_acc = m_acc & v;
            7: m_acc = m_acc | v;
            8: begin m_c = (m_acc < v) ? 1 : 0; m_z = (m_acc == v) ? 1 : 0; end
            default: ;
          endcase
          if (op != 8) m_z = (m_acc == 0) ? 1 : 0;
        end
        2: begin
          m_pc  = (m_pc + 1) % 256;
          m_acc = opnd;
          m_z   = (m_acc == 0) ? 1 : 0;
        end
        9:  begin m_acc = 255 - m_acc; m_c = 1; m_z = (m_acc == 0) ? 1 : 0; end
        10: begin m_acc = (m_acc + 1) % 256; m_z = (m_acc == 0) ? 1 : 0; end
        11: begin m_c = m_acc / 128; m_acc = (m_acc * 2) % 256; m_z = (m_acc == 0) ? 1 : 0; end
        12: begin m_c = m_acc % 2; m_acc = m_acc / 2; m_z = (m_acc == 0) ? 1 : 0; end
        13: begin
          m_c   = m_acc % 2;
          m_acc = m_acc / 2 + ((m_acc >= 128) ? 128 : 0);
          m_z   = (m_acc == 0) ? 1 : 0;
        end
        14: m_pc = opnd;
        15, 16, 17: begin
          bit t;
          t = (op == 15) ? (m_c == 1) : (op == 16) ? (m_c == 0) : (m_z == 1);
          if (t) begin m_pc = opnd; taken[op - 15]++; end
          else   begin m_pc = (m_pc + 1) % 256; not_taken[op - 15]++; end
        end
        default: ;  // NOP and unused opcodes
      endcase
    endtask

    initial begin
      for (int i = 0; i < 256; i++) begin
        m_mem[i]    = int'(image(g)[i]);
        m_stored[i] = 1'b0;
      end
      m_acc = 0; m_pc = 0; m_c = 0; m_z = 0;
      exp_cycles = 0; cycles = 0; n = 0;
      @(negedge rst);
      #0;
      forever begin
        if (fetch && n < NINSTR) begin
          checks++;
          if (int'(pc) != m_pc || int'(acca) != m_acc || int'(c_flag) != m_c ||
              int'(z_flag) != m_z || (n > 0 && cycles != exp_cycles) || leds != acca) begin
            failures++;
            if (failures < 10)
              $display("image %0d instr %0d: pc=%02h acca=%02h c=%0d z=%0d cycles=%0d, expected pc=%02h acca=%02h c=%0d z=%0d cycles=%0d",
                       g, n, pc, acca, c_flag, z_flag, cycles, m_pc, m_acc, m_c, m_z, exp_cycles);
          end
          ref_step(exp_cycles);
          cycles = 0;
          n++;
          if (n == NINSTR) begin
            done++;
          end
        end
        @(posedge clk); #1;
        cycles++;
      end
    end
  end

  initial begin
    foreach (op_seen[i]) op_seen[i] = 0;
    foreach (taken[i]) begin taken[i] = 0; not_taken[i] = 0; end
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (done == NPROG);
    foreach (op_seen[i]) begin
      checks++;
      if (op_seen[i] == 0) begin failures++; $display("opcode %02h never executed", i); end
    end
    for (int i = 0; i < 3; i++) begin
      checks += 2;
      if (taken[i] == 0)     begin failures++; $display("jump %0d never taken", i); end
      if (not_taken[i] == 0) begin failures++; $display("jump %0d never fell through", i); end
    end
    checks += 3;
    if (add_carry == 0)        begin failures++; $display("ADDA never carried"); end
    if (sub_borrow == 0)       begin failures++; $display("SUBA never borrowed"); end
    if (load_after_store == 0) begin failures++; $display("no load of a stored byte"); end
    $display("coverage: unused-opcode=%0d jcs=%0d/%0d jcc=%0d/%0d jeq=%0d/%0d carry=%0d borrow=%0d ld-after-st=%0d",
             op_seen[18], taken[0], not_taken[0], taken[1], not_taken[1], taken[2], not_taken[2],
             add_carry, sub_borrow, load_after_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
