// tb_carry_flag: self-check of the carry flag register.
//
// After reset the flag must read 0. Then random shift_out and load values
// are applied for 200 cycles; a reference bit, updated only when load is
// high, predicts the flag one edge later. A mid-run reset must clear it
// again. A watchdog ends the run if it stalls.
module tb_carry_flag;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift_out = 1'b0, carry;
  logic ref_carry;
  int checks = 0, failures = 0;

  carry_flag dut (.clk(clk), .rst_n(rst_n), .load(load), .shift_out(shift_out), .carry(carry));

  always #5 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (carry !== exp) begin
      failures++;
      $display("FAIL %s: carry=%b expected=%b", what, carry, exp);
    end
  endtask

  initial begin
    ref_carry = 1'b0;
    load = 1'b1; shift_out = 1'b1;
    repeat (2) @(posedge clk);
    #1 check(1'b0, "in reset");
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      load      = 1'($urandom_range(1, 0));
      shift_out = 1'($urandom_range(1, 0));
      @(posedge clk);
      if (load) ref_carry = shift_out;
      #1 check(ref_carry, "update");
    end
    @(negedge clk);
    load = 1'b1; shift_out = 1'b1;
    @(posedge clk); #1 check(1'b1, "load 1");
    rst_n = 1'b0;
    #1 check(1'b0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
