// tb_barrel_shifter4: end-to-end self-check of the 4-bit shifter.
//
// The top runs at its default parameters. First the two cases worked in
// the design description are applied: code 00 on D=1011 must give S0=0 and
// S1..S3=D0..D2; code 10 must give S3=0 and S2..S0=D3..D1. Then every code
// is applied with every data word, twice, in shuffled order, with a random
// carry_load. A reference model built from shift operators predicts s and
// shift_out in the same cycle and the carry flag one clock edge later.
//
// Each mechanism of the design is counted and must occur at least once:
// left shift, no shift, logical and arithmetic right shift, an arithmetic
// shift that copies a 1 into the MSB, a 1 shifted out to the left and to the
// right, a carry load, a carry hold that blocks a differing shift_out, and
// the asynchronous reset clearing the flag.
module tb_barrel_shifter4;
  import bs4_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, carry_load = 1'b0;
  shift_op_e  op = OP_NOSH;
  logic [3:0] d = '0, s, exp_s;
  logic       shift_out, carry, exp_out, ref_carry;
  int checks = 0, failures = 0;

  typedef enum int {
    EV_SHL, EV_NOSH, EV_SRL, EV_SRA, EV_SIGN_COPY, EV_OUT_LEFT, EV_OUT_RIGHT,
    EV_CARRY_LOAD, EV_CARRY_HOLD, EV_RESET, EV_COUNT
  } event_e;
  int seen [EV_COUNT];

  barrel_shifter4 dut (
    .clk(clk), .rst_n(rst_n), .op(op), .d(d), .carry_load(carry_load),
    .s(s), .shift_out(shift_out), .carry(carry)
  );

  always #5 clk = ~clk;

  task automatic predict();
    case (op)
      OP_SHL:  begin exp_s = d << 1;               exp_out = d[3]; end
      OP_NOSH: begin exp_s = d;                    exp_out = 1'b0; end
      OP_SRL:  begin exp_s = d >> 1;               exp_out = d[0]; end
      default: begin exp_s = 4'($signed(d) >>> 1); exp_out = d[0]; end
    endcase
  endtask

  task automatic check_comb(input string what);
    predict();
    checks++;
    if (s !== exp_s || shift_out !== exp_out) begin
      failures++;
      $display("FAIL %s op=%b d=%b s=%b/%b shift_out=%b/%b",
               what, op, d, s, exp_s, shift_out, exp_out);
    end
  endtask

  task automatic check_carry(input string what);
    checks++;
    if (carry !== ref_carry) begin
      failures++;
      $display("FAIL %s carry=%b expected=%b", what, carry, ref_carry);
    end
  endtask

  // One operation: apply inputs on the falling edge, check the
  // combinational result, then the flag after the rising edge.
  task automatic run_op(input shift_op_e o, input logic [3:0] v, input logic ld);
    @(negedge clk);
    op = o; d = v; carry_load = ld;
    #1 check_comb("op");
    case (o)
      OP_SHL:  seen[EV_SHL]++;
      OP_NOSH: seen[EV_NOSH]++;
      OP_SRL:  seen[EV_SRL]++;
      default: begin seen[EV_SRA]++; if (v[3]) seen[EV_SIGN_COPY]++; end
    endcase
    if (o == OP_SHL && shift_out) seen[EV_OUT_LEFT]++;
    if ((o == OP_SRL || o == OP_SRA) && shift_out) seen[EV_OUT_RIGHT]++;
    if (ld) seen[EV_CARRY_LOAD]++;
    else if (shift_out != ref_carry) seen[EV_CARRY_HOLD]++;
    @(posedge clk);
    if (ld) ref_carry = shift_out;
    #1 check_carry("flag");
  endtask

  initial begin
    int order [64];
    ref_carry = 1'b0;
    repeat (2) @(posedge clk);
    #1 check_carry("reset");
    rst_n = 1'b1;

    // Worked cases: left shift with code 00, right shift with code 10.
    run_op(OP_SHL, 4'b1011, 1'b1);
    checks++;
    if (!(s[0] == 1'b0 && s[3:1] == 3'b011)) begin
      failures++; $display("FAIL worked left shift s=%b", s);
    end
    run_op(OP_SRL, 4'b1011, 1'b1);
    checks++;
    if (!(s[3] == 1'b0 && s[2:0] == 3'b101)) begin
      failures++; $display("FAIL worked right shift s=%b", s);
    end

    // Every code with every data word, twice, shuffled.
    for (int pass = 0; pass < 2; pass++) begin
      foreach (order[i]) order[i] = i;
      order.shuffle();
      foreach (order[i])
        run_op(shift_op_e'(order[i][5:4]), order[i][3:0], 1'($urandom_range(1, 0)));
    end

    // Asynchronous reset must clear a set flag.
    run_op(OP_SHL, 4'b1000, 1'b1);
    #2 rst_n = 1'b0;
    #1 ref_carry = 1'b0;
    if (carry === 1'b0 && shift_out === 1'b1) seen[EV_RESET]++;
    check_carry("async reset");
    #2 rst_n = 1'b1;

    for (int e = 0; e < EV_COUNT; e++) begin
      checks++;
      if (seen[e] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", event_e'(e));
      end else
        $display("mechanism %s happened %0d times", event_e'(e), seen[e]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
