// computer: an 8-bit accumulator computer built from the memory, the address
// multiplexer, the ALU, the control unit (CCU) and its registers.
//
// Datapath: the memory output q feeds the instruction register (IR), the
// operand address register (MAR), the program counter's load input (jump
// targets) and the ALU's B operand. The ALU's A operand is the accumulator
// ACCA, and the ALU result goes back into ACCA. ACCA is also the memory's
// write data. The address multiplexer gives the memory either the PC or MAR.
// The CCU drives all load enables from the IR and the C and Z flags.
//
// The LEDs are driven straight from ACCA: a 1 bit is a dark LED, as in the
// running-light program of mem_init_pkg that the memory holds by default.
// fetch is high in the first cycle of each instruction; pc, acca and the
// flags are brought out for observation. clk is the only clock; rst is a
// synchronous, active-high reset that sets PC to PC_RESET and clears IR,
// MAR, ACCA, C and Z (the memory keeps its contents). On a board the clock
// must be slow enough (a few hertz) for the running light to be seen.
//
// The set of blocks and how they connect follow the block diagram of the
// design; the widths of the address, the reset and the LED connection are
// this design's choices.
module computer
  import computer_pkg::*;
#(
  parameter addr_t      PC_RESET = '0,
  parameter mem_image_t INIT     = mem_init_pkg::running_lights()
) (
  input  logic  clk,
  input  logic  rst,
  output word_t leds,
  output word_t acca,
  output addr_t pc,
  output logic  c_flag,
  output logic  z_flag,
  output logic  fetch
);

  ctrl_t      ctrl;
  ccu_state_e state;
  word_t      mem_q;
  word_t      ir;
  addr_t      mar;
  addr_t      mem_addr;
  word_t      alu_y;
  logic       alu_c;
  logic       alu_z;

  ccu u_ccu (
    .clk    (clk),
    .rst    (rst),
    .ir     (ir),
    .c_flag (c_flag),
    .z_flag (z_flag),
    .ctrl   (ctrl),
    .state  (state)
  );

  program_counter #(.WIDTH(ADDR_W), .RESET_VALUE(PC_RESET)) u_pc (
    .clk  (clk),
    .rst  (rst),
    .load (ctrl.pc_load),
    .inc  (ctrl.pc_inc),
    .d    (mem_q),
    .q    (pc)
  );

  register_en #(.WIDTH(DATA_W)) u_ir (
    .clk (clk), .rst (rst), .load (ctrl.ir_load), .d (mem_q), .q (ir)
  );

  register_en #(.WIDTH(ADDR_W)) u_mar (
    .clk (clk), .rst (rst), .load (ctrl.mar_load), .d (mem_q), .q (mar)
  );

  register_en #(.WIDTH(DATA_W)) u_acca (
    .clk (clk), .rst (rst), .load (ctrl.acca_load), .d (alu_y), .q (acca)
  );

  register_en #(.WIDTH(1)) u_c (
    .clk (clk), .rst (rst), .load (ctrl.c_load), .d (alu_c), .q (c_flag)
  );

  register_en #(.WIDTH(1)) u_z (
    .clk (clk), .rst (rst), .load (ctrl.z_load), .d (alu_z), .q (z_flag)
  );

  addr_mux #(.WIDTH(ADDR_W)) u_addr_mux (
    .pc   (pc),
    .mar  (mar),
    .sel  (ctrl.addr_sel),
    .addr (mem_addr)
  );

  alu u_alu (
    .a     (acca),
    .b     (mem_q),
    .op    (ctrl.alu_op),
    .y     (alu_y),
    .carry (alu_c),
    .zero  (alu_z)
  );

  mem_block #(.INIT(INIT)) u_mem (
    .clock   (clk),
    .address (mem_addr),
    .data    (acca),
    .wren    (ctrl.mem_wren),
    .q       (mem_q)
  );

  assign leds  = acca;
  assign fetch = (state == ST_FETCH);

endmodule
