// shift_ctrl_decoder: turns the 2-bit shift code into the shifter's
// control lines.
//
// A 2-to-4 decoder makes exactly one of four select lines active for each
// code. Output 0 is the Left line and output 1 the No Shift line. An OR gate
// combines outputs 2 and 3 into the Right line, since a logical and an
// arithmetic right shift move the data the same way; output 3 alone is
// brought out as the arith line, which the array uses to copy the MSB. This
// structure (decoder plus one OR gate for Right) is the decoder-driven
// shifter's own; packaging the lines as a struct is this design's choice.
//
// Interface: op (shift_op_e) in, lines (shift_lines_t) out.
// Timing: purely combinational, no clock.
module shift_ctrl_decoder
  import bs4_pkg::*;
(
  input  shift_op_e    op,
  output shift_lines_t lines
);

  logic [3:0] dec;  // one-hot decoder outputs 0..3

  always_comb begin
    dec = 4'b0000;
    dec[op] = 1'b1;
  end

  always_comb begin
    lines.left     = dec[0];
    lines.no_shift = dec[1];
    lines.right    = dec[2] | dec[3];
    lines.arith    = dec[3];
  end

endmodule
