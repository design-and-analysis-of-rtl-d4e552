// bs4_shift_array: the AND-OR array of the 4-bit shifter, with shift-out.
//
// Every data bit D[i] feeds a group of AND gates, one per control line:
//   - D[i] AND Left     goes to output S[i+1]
//   - D[i] AND NoShift  goes to output S[i]
//   - D[i] AND Right    goes to output S[i-1]
// Each output S[j] is the OR of the AND gates aimed at it. With only one
// control line active, S is D shifted one place left (0 into S[0]), D
// unchanged, or D shifted one place right (0 into S[WIDTH-1]).
//
// Two additions turn this into the proposed circuit:
//   - Shift Out: the two AND gates at the ends of the array, D[MSB] AND Left
//     and D[0] AND Right, whose bits would otherwise be lost, are ORed into
//     the shift_out output. It carries D[MSB] on a left shift and D[0] on a
//     right shift, and is 0 with no shift.
//   - Arithmetic copy: the No Shift gate of the MSB column is enabled by
//     NoShift OR Arith, so on an arithmetic right shift the MSB stays in
//     S[MSB] while it also moves into S[MSB-1].
// The gate structure follows the document; the WIDTH parameter is this
// design's generalisation of its 4-bit circuit (default 4).
//
// Interface: d (data in), lines (control lines), s (data out), shift_out.
// Timing: purely combinational, two gate levels after the control lines.
module bs4_shift_array
  import bs4_pkg::*;
#(
  parameter int unsigned WIDTH = BS_WIDTH
) (
  input  logic [WIDTH-1:0] d,
  input  shift_lines_t     lines,
  output logic [WIDTH-1:0] s,
  output logic             shift_out
);

  logic [WIDTH-1:0] and_left;   // D[i] & Left   -> S[i+1]
  logic [WIDTH-1:0] and_pass;   // D[i] & pass   -> S[i]
  logic [WIDTH-1:0] and_right;  // D[i] & Right  -> S[i-1]

  always_comb begin
    for (int unsigned i = 0; i < WIDTH; i++) begin
      and_left[i]  = d[i] & lines.left;
      and_right[i] = d[i] & lines.right;
      if (i == WIDTH - 1)
        and_pass[i] = d[i] & (lines.no_shift | lines.arith);
      else
        and_pass[i] = d[i] & lines.no_shift;
    end
  end

  always_comb begin
    for (int unsigned j = 0; j < WIDTH; j++) begin
      s[j] = and_pass[j];
      if (j > 0)         s[j] = s[j] | and_left[j-1];
      if (j < WIDTH - 1) s[j] = s[j] | and_right[j+1];
    end
    shift_out = and_left[WIDTH-1] | and_right[0];
  end

endmodule
