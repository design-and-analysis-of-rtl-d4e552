// barrel_shifter4: 4-bit one-place shifter with shift-out and carry flag.
//
// The 2-bit code op selects shift left (00), no shift (01), shift right
// logical (10) or shift right arithmetic (11). shift_ctrl_decoder turns it
// into the Left / No Shift / Right / arith control lines, and
// bs4_shift_array moves the data one place under those lines. The bit that
// falls off the end (D3 on a left shift, D0 on a right shift) appears on
// shift_out in the same cycle and is stored in carry_flag when carry_load is
// high, so a left shift can be checked for overflow and a right shift keeps
// the remainder of the division by two.
//
// The left and right shifts with shift-out are the proposed circuit. The
// decoder, the no-shift line and the arithmetic MSB copy come from the
// decoder-driven shifter it is presented with. The carry flag's clocking is
// this design's choice.
//
// Interface: clk, rst_n (async, active low), op, d[3:0], carry_load in;
//            s[3:0], shift_out (combinational) and carry (registered) out.
// Timing: s and shift_out are combinational from op and d; carry is updated
//         on the rising clk edge when carry_load is high.
module barrel_shifter4
  import bs4_pkg::*;
#(
  parameter int unsigned WIDTH = BS_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  shift_op_e        op,
  input  logic [WIDTH-1:0] d,
  input  logic             carry_load,
  output logic [WIDTH-1:0] s,
  output logic             shift_out,
  output logic             carry
);

  shift_lines_t lines;

  shift_ctrl_decoder u_dec (
    .op    (op),
    .lines (lines)
  );

  bs4_shift_array #(.WIDTH(WIDTH)) u_array (
    .d         (d),
    .lines     (lines),
    .s         (s),
    .shift_out (shift_out)
  );

  carry_flag u_carry (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (carry_load),
    .shift_out (shift_out),
    .carry     (carry)
  );

endmodule
