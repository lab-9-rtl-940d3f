// mem_block: the computer's single-port program and data memory.
//
// 256 bytes that hold both the program and its data. The ports mirror a
// synchronous single-port RAM block: address, data, wren and q, all on one
// clock. On a rising edge the memory registers the address; q shows the byte
// at that address from then until the next edge, so a read takes one cycle.
// With wren high the byte on data is written at address at the same edge, and
// q shows the byte as it was before the write.
//
// INIT is the image the memory holds after configuration; by default the
// running-light program of mem_init_pkg. The memory is not cleared by reset,
// as block RAM is not. A single-port memory holding the program, filled from
// an initialisation file, follows the design; its size, read latency and
// read-during-write behaviour are this design's choices.
module mem_block
  import computer_pkg::*;
#(
  parameter mem_image_t INIT = mem_init_pkg::running_lights()
) (
  input  logic  clock,
  input  addr_t address,
  input  word_t data,
  input  logic  wren,
  output word_t q
);

  word_t mem [MEM_DEPTH];

  initial begin
    for (int i = 0; i < MEM_DEPTH; i++) mem[i] = INIT[i];
  end

  always_ff @(posedge clock) begin
    if (wren) mem[address] <= data;
    q <= mem[address];
  end

endmodule
