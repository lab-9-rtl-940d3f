// addr_mux: the memory address multiplexer.
//
// Memory is addressed either by the program counter (instruction and operand
// bytes) or by the operand address register MAR (data reads and writes of
// LDAA, STAA, ADDA, SUBA, ANDA, ORAA and CMPA). sel comes from the control
// unit. Purely combinational. The two sources follow the block diagram of the
// design; the width parameter defaults to the 8-bit address chosen here.
module addr_mux
  import computer_pkg::*;
#(
  parameter int unsigned WIDTH = ADDR_W
) (
  input  logic [WIDTH-1:0] pc,
  input  logic [WIDTH-1:0] mar,
  input  addr_sel_e        sel,
  output logic [WIDTH-1:0] addr
);

  always_comb begin
    unique case (sel)
      SEL_PC:  addr = pc;
      SEL_MAR: addr = mar;
      default: addr = pc;
    endcase
  end

endmodule
