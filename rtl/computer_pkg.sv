// computer_pkg: types and constants shared by the blocks of the 8-bit
// accumulator computer.
//
// The machine has one accumulator (ACCA), a carry flag (C) and a zero flag
// (Z). Every instruction starts with a one-byte opcode; instructions that take
// an address or an immediate are followed by one operand byte. The opcode
// numbers are those of the instruction table the design follows (0x00 NOP to
// 0x11 JEQ). The 8-bit data word follows the design; the 8-bit address (a
// 256-byte memory), the ALU operation encoding, the control word and the
// controller states are this design's own choices.
package computer_pkg;

  localparam int unsigned DATA_W    = 8;
  localparam int unsigned ADDR_W    = 8;
  localparam int unsigned MEM_DEPTH = 1 << ADDR_W;

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Whole memory image, byte i at [i]. Packed so it can be a parameter.
  typedef logic [MEM_DEPTH-1:0][DATA_W-1:0] mem_image_t;

  // Instruction opcodes (first byte of each instruction).
  typedef enum logic [DATA_W-1:0] {
    OP_NOP      = 8'h00,  // no operation
    OP_LDAA     = 8'h01,  // ACCA <- M[addr]; Z
    OP_LDAA_IMM = 8'h02,  // ACCA <- #num;    Z
    OP_STAA     = 8'h03,  // M[addr] <- ACCA; Z
    OP_ADDA     = 8'h04,  // ACCA <- ACCA + M[addr]; C, Z
    OP_SUBA     = 8'h05,  // ACCA <- ACCA - M[addr]; C, Z
    OP_ANDA     = 8'h06,  // ACCA <- ACCA & M[addr]; Z
    OP_ORAA     = 8'h07,  // ACCA <- ACCA | M[addr]; Z
    OP_CMPA     = 8'h08,  // ACCA - M[addr], result dropped; C, Z
    OP_COMA     = 8'h09,  // ACCA <- ~ACCA; C=1, Z
    OP_INCA     = 8'h0A,  // ACCA <- ACCA + 1; Z
    OP_LSLA     = 8'h0B,  // logical shift left; C, Z
    OP_LSRA     = 8'h0C,  // logical shift right; C, Z
    OP_ASRA     = 8'h0D,  // arithmetic shift right; C, Z
    OP_JMP      = 8'h0E,  // PC <- addr
    OP_JCS      = 8'h0F,  // PC <- addr if C = 1
    OP_JCC      = 8'h10,  // PC <- addr if C = 0
    OP_JEQ      = 8'h11   // PC <- addr if Z = 1
  } opcode_e;

  // ALU operations. A is ACCA, B is the byte read from memory.
  typedef enum logic [3:0] {
    ALU_PASS_B = 4'd0,
    ALU_PASS_A = 4'd1,
    ALU_ADD    = 4'd2,
    ALU_SUB    = 4'd3,
    ALU_AND    = 4'd4,
    ALU_OR     = 4'd5,
    ALU_COM    = 4'd6,
    ALU_INC    = 4'd7,
    ALU_LSL    = 4'd8,
    ALU_LSR    = 4'd9,
    ALU_ASR    = 4'd10
  } alu_op_e;

  // Memory address source.
  typedef enum logic {
    SEL_PC  = 1'b0,
    SEL_MAR = 1'b1
  } addr_sel_e;

  // Controller states.
  typedef enum logic [2:0] {
    ST_FETCH    = 3'd0,  // address = PC, PC += 1
    ST_DECODE   = 3'd1,  // opcode arrives, load IR
    ST_EXECUTE  = 3'd2,  // operand byte arrives; inherent ops, immediates, jumps finish
    ST_MEM_ADDR = 3'd3,  // address = MAR; STAA writes and finishes
    ST_MEM_EXEC = 3'd4   // memory operand arrives; ALU op into ACCA and flags
  } ccu_state_e;

  // Control word driven by the control unit each cycle.
  typedef struct packed {
    logic      pc_inc;
    logic      pc_load;
    logic      ir_load;
    logic      mar_load;
    logic      acca_load;
    logic      c_load;
    logic      z_load;
    logic      mem_wren;
    addr_sel_e addr_sel;
    alu_op_e   alu_op;
  } ctrl_t;

  // Number of bytes an instruction occupies (1 or 2).
  function automatic int unsigned instr_bytes(opcode_e op);
    case (op)
      OP_NOP, OP_COMA, OP_INCA, OP_LSLA, OP_LSRA, OP_ASRA: return 1;
      OP_LDAA, OP_LDAA_IMM, OP_STAA, OP_ADDA, OP_SUBA, OP_ANDA, OP_ORAA,
      OP_CMPA, OP_JMP, OP_JCS, OP_JCC, OP_JEQ:             return 2;
      default:                                             return 1;
    endcase
  endfunction

endpackage
