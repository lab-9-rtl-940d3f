// alu: combinational 8-bit arithmetic and logic unit of the computer.
//
// Operand a is the accumulator ACCA and operand b the byte read from memory.
// The operation is chosen by op (computer_pkg::alu_op_e). Besides the result
// the ALU produces the candidate carry and zero flags; the control unit
// decides, per instruction, whether the flag registers take them.
//
//   ALU_PASS_B  y = b             (loads)
//   ALU_PASS_A  y = a             (store: zero flag of ACCA)
//   ALU_ADD     y = a + b         carry = carry out of bit 7
//   ALU_SUB     y = a - b         carry = borrow (1 when b > a, unsigned)
//   ALU_AND/OR  y = a & b, a | b
//   ALU_COM     y = ~a            carry = 1
//   ALU_INC     y = a + 1
//   ALU_LSL     y = a << 1        carry = a[7]
//   ALU_LSR     y = a >> 1        carry = a[0]
//   ALU_ASR     y = {a[7], a[7:1]} carry = a[0]
//
// The set of operations and "COMA sets C" follow the instruction table; the
// carry of a subtraction as a borrow and the shifted-out bit as the carry of
// a shift are this design's choices. No clock: the result is valid in the
// same cycle as the inputs.
module alu
  import computer_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_e op,
  output word_t   y,
  output logic    carry,
  output logic    zero
);

  logic [DATA_W:0] wide;

  always_comb begin
    wide  = '0;
    y     = a;
    carry = 1'b0;
    unique case (op)
      ALU_PASS_B: y = b;
      ALU_PASS_A: y = a;
      ALU_ADD: begin
        wide  = {1'b0, a} + {1'b0, b};
        y     = wide[DATA_W-1:0];
        carry = wide[DATA_W];
      end
      ALU_SUB: begin
        wide  = {1'b0, a} - {1'b0, b};
        y     = wide[DATA_W-1:0];
        carry = wide[DATA_W];
      end
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_COM: begin
        y     = ~a;
        carry = 1'b1;
      end
      ALU_INC: y = a + word_t'(1);
      ALU_LSL: begin
        y     = {a[DATA_W-2:0], 1'b0};
        carry = a[DATA_W-1];
      end
      ALU_LSR: begin
        y     = {1'b0, a[DATA_W-1:1]};
        carry = a[0];
      end
      ALU_ASR: begin
        y     = {a[DATA_W-1], a[DATA_W-1:1]};
        carry = a[0];
      end
      default: y = a;
    endcase
    zero = (y == '0);
  end

endmodule
