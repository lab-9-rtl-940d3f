// mem_init_pkg: the program the memory holds after configuration.
//
// running_lights() returns a 256-byte image with a running-light program:
// ACCA starts at 0000_0001 and is shifted left one place per loop; once the
// one has reached bit 7 the program jumps back to the start. ACCA drives the
// LEDs, and a 1 bit is the LED that is dark, so one dark LED runs across a
// row of lit ones. Before each shift, ACCA is compared with the byte 0x80 held
// at address 0x20, so the accumulator never passes through zero. Every
// other byte of the image is 0x00 (NOP).
//
//   addr  bytes   instruction
//   0x00  02 01   LDAA_IMM #0x01
//   0x02  08 20   CMPA 0x20        ; Z = (ACCA == 0x80)
//   0x04  11 00   JEQ  0x00        ; last LED reached: start again
//   0x06  0B      LSLA
//   0x07  0E 02   JMP  0x02
//   0x20  80      constant 1000_0000
//
// The algorithm (start at 1, shift left, jump back at the end) follows the
// lab text; the exact code and addresses are this design's own.
package mem_init_pkg;
  import computer_pkg::*;

  function automatic mem_image_t running_lights();
    mem_image_t img;
    img       = '0;
    img[8'h00] = OP_LDAA_IMM;
    img[8'h01] = 8'h01;
    img[8'h02] = OP_CMPA;
    img[8'h03] = 8'h20;
    img[8'h04] = OP_JEQ;
    img[8'h05] = 8'h00;
    img[8'h06] = OP_LSLA;
    img[8'h07] = OP_JMP;
    img[8'h08] = 8'h02;
    img[8'h20] = 8'h80;
    return img;
  endfunction

endpackage
