// carry_flag: one-bit register that keeps the bit shifted out of the array.
//
// On a rising clock edge with load high, the flag takes the value of
// shift_out; with load low it holds. An active-low asynchronous reset clears
// it. That the shifted-out bit is stored in a carry flag is the document's;
// the clock, the load enable and the reset are this design's choices, as the
// document gives no timing for the flag.
//
// Interface: clk, rst_n, load, shift_out in; carry out.
// Timing: carry changes one clock edge after a load.
module carry_flag (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic shift_out,
  output logic carry
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      carry <= 1'b0;
    else if (load)
      carry <= shift_out;
  end

endmodule
