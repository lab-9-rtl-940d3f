// alu_tb: exhaustive self-checking testbench for the ALU.
//
// Applies every operation to every pair of 8-bit operands and compares the
// result, carry and zero outputs with a reference written with integer
// arithmetic (sums, differences, multiplication and division by two) rather
// than with the bit operations the ALU uses. The ALU is combinational; a
// 1 ns settle time separates the vectors.
module alu_tb;
  import computer_pkg::*;

  word_t   a, b, y;
  alu_op_e op;
  logic    carry, zero;

  int checks   = 0;
  int failures = 0;

  alu dut (.a(a), .b(b), .op(op), .y(y), .carry(carry), .zero(zero));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic reference(input alu_op_e o, input int ia, input int ib,
                           output int ey, output int ec);
    ec = 0;
    case (o)
      ALU_PASS_B: ey = ib;
      ALU_PASS_A: ey = ia;
      ALU_ADD:    begin ey = (ia + ib) % 256; ec = (ia + ib > 255) ? 1 : 0; end
      ALU_SUB:    begin ey = (ia - ib + 256) % 256; ec = (ia < ib) ? 1 : 0; end
      ALU_AND: begin
        ey = 0;
        for (int k = 0, p = 1; k < 8; k++, p *= 2)
          if ((ia / p) % 2 == 1 && (ib / p) % 2 == 1) ey += p;
      end
      ALU_OR: begin
        ey = 0;
        for (int k = 0, p = 1; k < 8; k++, p *= 2)
          if ((ia / p) % 2 == 1 || (ib / p) % 2 == 1) ey += p;
      end
      ALU_COM:    begin ey = 255 - ia; ec = 1; end
      ALU_INC:    ey = (ia + 1) % 256;
      ALU_LSL:    begin ey = (ia * 2) % 256; ec = (ia >= 128) ? 1 : 0; end
      ALU_LSR:    begin ey = ia / 2; ec = ia % 2; end
      ALU_ASR:    begin ey = ia / 2 + ((ia >= 128) ? 128 : 0); ec = ia % 2; end
      default:    ey = ia;
    endcase
  endtask

  initial begin
    static alu_op_e ops [11] = '{ALU_PASS_B, ALU_PASS_A, ALU_ADD, ALU_SUB, ALU_AND,
                          ALU_OR, ALU_COM, ALU_INC, ALU_LSL, ALU_LSR, ALU_ASR};
    int ey, ec;
    foreach (ops[i]) begin
      for (int ia = 0; ia < 256; ia++) begin
        for (int ib = 0; ib < 256; ib++) begin
          op = ops[i];
          a  = word_t'(ia);
          b  = word_t'(ib);
          #1;
          reference(ops[i], ia, ib, ey, ec);
          checks++;
          if (int'(y) != ey || int'(carry) != ec || zero != (ey == 0)) begin
            failures++;
            if (failures <= 10)
              $display("mismatch op=%s a=%02h b=%02h: y=%02h c=%0d z=%0d, expected y=%02h c=%0d z=%0d",
                       ops[i].name(), a, b, y, carry, zero, ey, ec, ey == 0);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
