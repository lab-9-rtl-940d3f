// program_counter: the computer's program counter.
//
// On a rising clock edge the PC takes RESET_VALUE (the reset constant) while
// rst is high; otherwise load replaces it with d (a jump target read from
// memory), and inc adds one (past each opcode or operand byte read). load
// wins over inc. The count wraps from 0xFF to 0x00. Loading and incrementing
// follow the instruction table; the reset value 0x00, the synchronous reset
// and the priority are this design's choices.
module program_counter
  import computer_pkg::*;
#(
  parameter int unsigned      WIDTH       = ADDR_W,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic             inc,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= RESET_VALUE;
    else if (load) q <= d;
    else if (inc)  q <= q + 1'b1;
  end

endmodule
