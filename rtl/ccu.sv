// ccu: the control unit of the accumulator computer.
//
// A Moore-style state machine that runs every instruction as a fixed
// sequence of states and, in each state, drives the control word (load
// enables, PC increment, address-mux select, memory write enable, ALU
// operation). The memory has a one-cycle read, so a byte addressed in one
// state is on mem_q in the next.
//
//   FETCH     address = PC, PC += 1                               -> DECODE
//   DECODE    opcode on mem_q, IR <- opcode; address = PC         -> EXECUTE
//   EXECUTE   (operand byte, if any, on mem_q)
//               NOP, COMA, INCA, LSLA, LSRA, ASRA: ALU into ACCA  -> FETCH
//               LDAA_IMM: ACCA <- operand, PC += 1                -> FETCH
//               JMP, JCS, JCC, JEQ: PC <- operand if taken,
//                 else PC += 1                                    -> FETCH
//               LDAA, STAA, ADDA, SUBA, ANDA, ORAA, CMPA:
//                 MAR <- operand, PC += 1                         -> MEM_ADDR
//   MEM_ADDR  address = MAR; STAA writes ACCA, Z                  -> FETCH
//             others                                              -> MEM_EXEC
//   MEM_EXEC  memory byte on mem_q; ALU into ACCA (not for CMPA) -> FETCH
//
// Instructions thus take 3 cycles (no memory operand), 4 (STAA) or 5
// (LDAA, ADDA, SUBA, ANDA, ORAA, CMPA). Which flags each instruction changes
// follows the instruction table, including that STAA changes Z (here to
// "ACCA is zero"). The state sequence and cycle counts are this design's own.
// Opcodes 0x12 to 0xFF are executed as NOP. ir is the instruction register's
// output; c_flag and z_flag are the flag registers' outputs.
module ccu
  import computer_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  word_t      ir,
  input  logic       c_flag,
  input  logic       z_flag,
  output ctrl_t      ctrl,
  output ccu_state_e state
);

  ccu_state_e next;
  opcode_e    op;

  assign op = opcode_e'(ir);

  always_ff @(posedge clk) begin
    if (rst) state <= ST_FETCH;
    else     state <= next;
  end

  // ALU operation of the instructions that go through MEM_EXEC.
  function automatic alu_op_e mem_alu_op(opcode_e o);
    case (o)
      OP_ADDA:         return ALU_ADD;
      OP_SUBA, OP_CMPA: return ALU_SUB;
      OP_ANDA:         return ALU_AND;
      OP_ORAA:         return ALU_OR;
      default:         return ALU_PASS_B;  // LDAA
    endcase
  endfunction

  // Branch condition of the jump in IR.
  logic taken;
  assign taken = (op == OP_JMP) ||
                 (op == OP_JCS &&  c_flag) ||
                 (op == OP_JCC && !c_flag) ||
                 (op == OP_JEQ &&  z_flag);

  always_comb begin
    ctrl = '0;  // addr_sel = SEL_PC, alu_op = ALU_PASS_B, nothing loaded
    next = ST_FETCH;
    unique case (state)
      ST_FETCH: begin
        ctrl.pc_inc = 1'b1;
        next        = ST_DECODE;
      end
      ST_DECODE: begin
        ctrl.ir_load = 1'b1;
        next         = ST_EXECUTE;
      end
      ST_EXECUTE: begin
        case (op)
          OP_COMA: begin
            ctrl.alu_op    = ALU_COM;
            ctrl.acca_load = 1'b1;
            ctrl.c_load    = 1'b1;
            ctrl.z_load    = 1'b1;
          end
          OP_INCA: begin
            ctrl.alu_op    = ALU_INC;
            ctrl.acca_load = 1'b1;
            ctrl.z_load    = 1'b1;
          end
          OP_LSLA, OP_LSRA, OP_ASRA: begin
            ctrl.alu_op    = (op == OP_LSLA) ? ALU_LSL :
                             (op == OP_LSRA) ? ALU_LSR : ALU_ASR;
            ctrl.acca_load = 1'b1;
            ctrl.c_load    = 1'b1;
            ctrl.z_load    = 1'b1;
          end
          OP_LDAA_IMM: begin
            ctrl.alu_op    = ALU_PASS_B;
            ctrl.acca_load = 1'b1;
            ctrl.z_load    = 1'b1;
            ctrl.pc_inc    = 1'b1;
          end
          OP_JMP, OP_JCS, OP_JCC, OP_JEQ: begin
            ctrl.pc_load = taken;
            ctrl.pc_inc  = !taken;
          end
          OP_LDAA, OP_STAA, OP_ADDA, OP_SUBA, OP_ANDA, OP_ORAA, OP_CMPA: begin
            ctrl.mar_load = 1'b1;
            ctrl.pc_inc   = 1'b1;
            next          = ST_MEM_ADDR;
          end
          default: ;  // NOP and unused opcodes
        endcase
      end
      ST_MEM_ADDR: begin
        ctrl.addr_sel = SEL_MAR;
        if (op == OP_STAA) begin
          ctrl.mem_wren = 1'b1;
          ctrl.alu_op   = ALU_PASS_A;
          ctrl.z_load   = 1'b1;
        end else begin
          next = ST_MEM_EXEC;
        end
      end
      ST_MEM_EXEC: begin
        ctrl.alu_op    = mem_alu_op(op);
        ctrl.acca_load = (op != OP_CMPA);
        ctrl.z_load    = 1'b1;
        ctrl.c_load    = (op == OP_ADDA) || (op == OP_SUBA) || (op == OP_CMPA);
      end
      default: next = ST_FETCH;
    endcase
  end

  // A jump is either taken or falls through, never both.
  a_pc_exclusive: assert property (@(posedge clk) disable iff (rst)
                                   !(ctrl.pc_load && ctrl.pc_inc));
  // Memory is written only through the operand address.
  a_write_via_mar: assert property (@(posedge clk) disable iff (rst)
                                    ctrl.mem_wren |-> ctrl.addr_sel == SEL_MAR);

endmodule
