// bs4_pkg: types shared by the 4-bit shifter.
//
// The shifter is steered by a 2-bit code. The code is decoded into one-hot
// control lines (Left, No Shift, Right) plus an "arith" line that asks for
// the sign bit to be kept on a right shift. The code assignment follows the
// shift-code table of the decoder-driven shifter this design is built on:
// 00 shift left, 01 no shift, 10 shift right logical, 11 shift right
// arithmetic. The order of the two code bits (C2 is the MSB) is this
// design's reading of that table.
package bs4_pkg;

  // Data width of the shifter.
  localparam int unsigned BS_WIDTH = 4;

  // 2-bit shift code {C2, C1}.
  typedef enum logic [1:0] {
    OP_SHL   = 2'b00,  // shift left, 0 into the LSB
    OP_NOSH  = 2'b01,  // pass the data unchanged
    OP_SRL   = 2'b10,  // shift right logical, 0 into the MSB
    OP_SRA   = 2'b11   // shift right arithmetic, MSB copied
  } shift_op_e;

  // Decoded control lines that run across the AND-OR array.
  typedef struct packed {
    logic left;      // decoder output 0
    logic no_shift;  // decoder output 1
    logic right;     // decoder output 2 OR output 3
    logic arith;     // decoder output 3: keep the MSB in place
  } shift_lines_t;

endpackage
