// tb_duty_cycle_trim: self-checking test of the duty cycle trimming stage.
//
// clk_in and x are driven directly, first through every ordered pair of input
// combinations, then with random values. The expected output comes from the
// truth table: if clk_in != x then clk_out = clk_in, otherwise it keeps its
// last value. y must always be the inverse of clk_out. Each of the four rows
// of the table must be exercised, and both hold rows must be seen holding a 0
// and holding a 1. A watchdog ends the run after a fixed time.
`timescale 1ns / 1ps

module tb_duty_cycle_trim;

  logic clk_in;
  logic x;
  logic y;
  logic clk_out;

  int checks = 0;
  int failures = 0;
  int row_count[4];
  int hold_value_count[2];  // holds seen of a 0 and of a 1
  logic expected;

  duty_cycle_trim dut (
      .clk_in (clk_in),
      .x      (x),
      .y      (y),
      .clk_out(clk_out)
  );

  task automatic apply(logic c, logic d);
    clk_in = c;
    x = d;
    #1;
    if (c != d) expected = c;
    else hold_value_count[expected]++;
    row_count[{c, d}]++;
    checks++;
    if (clk_out !== expected || y !== ~expected) begin
      failures++;
      $display("FAIL clk_in=%0b x=%0b: clk_out=%0b y=%0b expected clk_out=%0b", c, d, clk_out,
               y, expected);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) row_count[i] = 0;
    hold_value_count[0] = 0;
    hold_value_count[1] = 0;
    // Known start: clk_in = 1, x = 0 sets clk_out = 1.
    clk_in = 1'b1;
    x = 1'b0;
    #1;
    expected = 1'b1;
    // Every ordered pair of combinations.
    for (int a = 0; a < 4; a++) begin
      for (int b = 0; b < 4; b++) begin
        apply(a[1], a[0]);
        apply(b[1], b[0]);
      end
    end
    // Random sequence.
    repeat (2000) apply(1'($urandom), 1'($urandom));
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (row_count[i] == 0) begin
        failures++;
        $display("FAIL truth-table row %0d never applied", i);
      end
    end
    checks++;
    if (hold_value_count[0] == 0 || hold_value_count[1] == 0) begin
      failures++;
      $display("FAIL hold of 0 seen %0d times, hold of 1 seen %0d times", hold_value_count[0],
               hold_value_count[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
