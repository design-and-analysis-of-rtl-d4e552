// tb_shift_ctrl_decoder: exhaustive self-check of the shift-code decoder.
//
// All four codes are applied. The expected control lines come from the
// code table written out here: 00 Left only, 01 No Shift only, 10 Right
// only, 11 Right and arith. Each code must also make exactly one of
// Left / No Shift / Right active. A watchdog ends the run if it stalls.
module tb_shift_ctrl_decoder;
  import bs4_pkg::*;

  shift_op_e    op;
  shift_lines_t lines;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  shift_ctrl_decoder dut (.op(op), .lines(lines));

  always #5 clk = ~clk;

  // Expected lines per code, as {left, no_shift, right, arith}.
  function automatic logic [3:0] expected(input logic [1:0] code);
    case (code)
      2'b00:   return 4'b1000;
      2'b01:   return 4'b0100;
      2'b10:   return 4'b0010;
      default: return 4'b0011;
    endcase
  endfunction

  initial begin
    for (int c = 0; c < 4; c++) begin
      op = shift_op_e'(c[1:0]);
      @(posedge clk);
      checks++;
      if (lines !== expected(c[1:0])) begin
        failures++;
        $display("FAIL op=%b lines=%b expected=%b", c[1:0], lines, expected(c[1:0]));
      end
      checks++;
      if (!$onehot({lines.left, lines.no_shift, lines.right})) begin
        failures++;
        $display("FAIL op=%b: direction lines not one-hot", c[1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
