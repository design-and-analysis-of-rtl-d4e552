// tb_bs4_shift_array: exhaustive self-check of the AND-OR shift array.
//
// Every 4-bit data word is applied under every legal set of control lines
// (left; no shift; right; right with arith) and under all lines low. The
// expected outputs are computed with shift operators, independent of the
// gate structure: left gives {d[2:0],0} and shift_out d[3]; right logical
// gives {0,d[3:1]} and d[0]; right arithmetic gives {d[3],d[3:1]} and d[0];
// no shift gives d and 0; no line gives 0. The document's two worked cases
// (left: S0=0, S1..S3=D0..D2; right: S3=0, S2..S0=D3..D1) are the first two.
module tb_bs4_shift_array;
  import bs4_pkg::*;

  localparam int W = 4;
  logic [W-1:0] d, s, exp_s;
  logic         shift_out, exp_out;
  shift_lines_t lines;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  bs4_shift_array dut (.d(d), .lines(lines), .s(s), .shift_out(shift_out));

  always #5 clk = ~clk;

  initial begin
    for (int m = 0; m < 5; m++) begin
      for (int v = 0; v < 16; v++) begin
        d = v[W-1:0];
        case (m)
          0: begin lines = '{left:1'b1, no_shift:1'b0, right:1'b0, arith:1'b0};
                   exp_s = d << 1;                  exp_out = d[W-1]; end
          1: begin lines = '{left:1'b0, no_shift:1'b0, right:1'b1, arith:1'b0};
                   exp_s = d >> 1;                  exp_out = d[0];   end
          2: begin lines = '{left:1'b0, no_shift:1'b0, right:1'b1, arith:1'b1};
                   exp_s = W'($signed(d) >>> 1);    exp_out = d[0];   end
          3: begin lines = '{left:1'b0, no_shift:1'b1, right:1'b0, arith:1'b0};
                   exp_s = d;                       exp_out = 1'b0;   end
          default: begin lines = '0; exp_s = '0;   exp_out = 1'b0;   end
        endcase
        @(posedge clk);
        checks++;
        if (s !== exp_s || shift_out !== exp_out) begin
          failures++;
          $display("FAIL mode=%0d d=%b s=%b/%b out=%b/%b", m, d, s, exp_s, shift_out, exp_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
