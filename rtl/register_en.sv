// register_en: a register with load enable and synchronous reset.
//
// On a rising clock edge q takes RESET_VALUE while rst is high, d when load
// is high, and otherwise keeps its value. The computer uses it for the
// instruction register (IR), the operand address register (MAR), the
// accumulator (ACCA) and the one-bit carry (C) and zero (Z) flags. The
// registers themselves follow the design; the synchronous active-high reset
// and a reset value of zero are this design's choices.
module register_en #(
  parameter int unsigned      WIDTH       = 8,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= RESET_VALUE;
    else if (load) q <= d;
  end

endmodule
