// tb_odd_freq_divider: end-to-end test of the odd divider at its default
// ratio, N = 5, with no parameter overridden.
//
// clk_in has a period of 10 ns. Its high time is set per phase:
//   A  5/5 ns (50%): clk_out must be high 25 ns and low 25 ns, period 50 ns.
//      x must be high 30 ns and low 20 ns (60%).
//   B  6/4 ns (60%): a 10% input duty error must leave only 10%/N = 2% at the
//      output, so clk_out is high 26 ns and low 24 ns.
//   C  4/6 ns (40%): clk_out high 24 ns, low 26 ns.
//   D  a reset in the middle of the run, then 50% again. In reset x is low and
//      clk_out high. Counted from the first rising edge of clk_in after the
//      reset, the waveform must be exact at once.
// In general clk_out is high (N-1)/2 * T + T_high(clk_in). Every rise of
// clk_out must fall on a rising edge of clk_in and every fall on a falling
// edge. A truth-table model (if clk_in != x then clk_out = clk_in, else hold)
// is also checked after every clk_in edge. y must always be ~clk_out.
// The mechanisms of the design are counted, and each must have happened:
// both hold rows of the truth table, both copy rows, rises and falls of
// clk_out, a corrected input duty error and a reset. A watchdog ends the run.
`timescale 1ns / 1ps

module tb_odd_freq_divider;

  localparam time N = 5;
  localparam time PERIOD = 10;

  logic clk_in = 1'b0;
  logic rst_n = 1'b0;
  logic x, y, clk_out;

  int checks = 0;
  int failures = 0;

  time t_high = 5;  // current high time of clk_in
  time exp_out_high, exp_out_low;  // expected clk_out high and low times
  bit measure = 1'b0;
  bit measure_x = 1'b0;  // x is measured in phase A only

  odd_freq_divider dut (
      .clk_in (clk_in),
      .rst_n  (rst_n),
      .x      (x),
      .y      (y),
      .clk_out(clk_out)
  );

  // clk_in generator with a programmable duty cycle.
  initial begin
    forever begin
      clk_in = 1'b1;
      #(t_high);
      clk_in = 1'b0;
      #(PERIOD - t_high);
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Edge times of clk_in.
  time t_in_rise = 0, t_in_fall = 0;
  always @(posedge clk_in) t_in_rise = $time;
  always @(negedge clk_in) t_in_fall = $time;

  // clk_out edges: alignment with clk_in and high/low durations.
  time t_out_rise = 0, t_out_fall = 0;
  int n_out_rise = 0, n_out_fall = 0, n_periods = 0;
  always @(posedge clk_out) begin
    n_out_rise++;
    check(clk_in == 1'b1 && t_in_rise == $time, "clk_out rise not on a clk_in rising edge");
    if (measure && t_out_fall > t_out_rise) begin
      check($time - t_out_fall == exp_out_low, $sformatf(
            "clk_out low for %0t, expected %0d", $time - t_out_fall, exp_out_low));
      check($time - t_out_rise == PERIOD * N, $sformatf(
            "clk_out period %0t, expected %0d", $time - t_out_rise, PERIOD * N));
      n_periods++;
    end
    t_out_rise = $time;
  end
  always @(negedge clk_out) begin
    n_out_fall++;
    check(clk_in == 1'b0 && t_in_fall == $time, "clk_out fall not on a clk_in falling edge");
    if (measure && t_out_rise > t_out_fall)
      check($time - t_out_rise == exp_out_high, $sformatf(
            "clk_out high for %0t, expected %0d", $time - t_out_rise, exp_out_high));
    t_out_fall = $time;
  end

  // x: untrimmed divided clock, 60% at 50% input.
  time t_x_rise = 0, t_x_fall = 0;
  int n_x_checked = 0;
  always @(posedge x) begin
    if (measure_x && t_x_fall > t_x_rise) begin
      check($time - t_x_fall == time'(PERIOD * (N - 1) / 2), "x low time");
      n_x_checked++;
    end
    t_x_rise = $time;
  end
  always @(negedge x) begin
    if (measure_x && t_x_rise > t_x_fall)
      check($time - t_x_rise == time'(PERIOD * (N + 1) / 2), "x high time");
    t_x_fall = $time;
  end

  // Truth-table model, sampled 1 ns after every clk_in edge.
  logic ref_out;
  bit ref_valid = 1'b0;
  int row_count[4] = '{0, 0, 0, 0};
  int hold_of[2] = '{0, 0};
  always @(clk_in) begin
    #1;
    row_count[{clk_in, x}]++;
    if (clk_in != x) begin
      ref_out = clk_in;
      ref_valid = 1'b1;
    end else if (ref_valid) hold_of[ref_out]++;
    if (ref_valid) check(clk_out == ref_out, "clk_out differs from the truth table");
    check(y == ~clk_out, "y is not the inverse of clk_out");
  end

  int start;  // n_periods at the start of a measurement
  int n_duty_corrected = 0;
  int n_resets = 0;

  task automatic run_phase(time high, int periods);
    measure = 1'b0;
    @(negedge clk_in);
    t_high = high;
    exp_out_high = time'(PERIOD * (N - 1) / 2 + high);
    exp_out_low = PERIOD * N - exp_out_high;
    // Let two output periods pass before measuring.
    repeat (2) @(posedge clk_out);
    #1;
    measure = 1'b1;
    begin
      start = n_periods;
      repeat (periods) @(posedge clk_out);
      #1;
      check(n_periods - start == periods, "output periods not all measured");
      if (high != PERIOD / 2 && n_periods - start == periods) n_duty_corrected++;
    end
  endtask

  initial begin
    exp_out_high = PERIOD * N / 2;
    exp_out_low = PERIOD * N / 2;
    repeat (2) @(negedge clk_in);
    rst_n = 1'b1;
    measure_x = 1'b1;
    run_phase(5, 20);  // A
    measure_x = 1'b0;
    check(n_x_checked >= 15, "x duty cycle not measured");
    run_phase(6, 20);  // B
    run_phase(4, 20);  // C
    // D: reset in the middle, then measure right from the first output rise.
    measure = 1'b0;
    @(negedge clk_in);
    t_high = 5;
    exp_out_high = PERIOD * N / 2;
    exp_out_low = PERIOD * N / 2;
    #2 rst_n = 1'b0;
    n_resets++;
    repeat (3) @(negedge clk_in);
    check(x == 1'b0 && clk_out == 1'b1, "x low and clk_out high while in reset");
    #2 rst_n = 1'b1;
    @(posedge clk_in);
    #1;
    check(clk_out == 1'b1, "clk_out not high after the first edge after reset");
    // It must fall N/2 input periods after that edge.
    t_out_rise = t_in_rise;  // the output period starts at this edge
    t_out_fall = 0;
    measure = 1'b1;
    begin
      start = n_periods;
      repeat (10) @(posedge clk_out);
      #1;
      check(n_periods - start == 10, "periods after reset not measured");
    end
    measure = 1'b0;

    // Every mechanism must have happened.
    check(row_count[0] > 0 && hold_of[0] + hold_of[1] > 0, "hold row clk_in=0, x=0 never seen");
    check(row_count[3] > 0, "hold row clk_in=1, x=1 never seen");
    check(row_count[1] > 0, "copy row clk_in=0, x=1 never seen");
    check(row_count[2] > 0, "copy row clk_in=1, x=0 never seen");
    check(hold_of[0] > 0 && hold_of[1] > 0, "a held 0 and a held 1 not both seen");
    check(n_out_rise > 50 && n_out_fall > 50, "too few clk_out edges");
    check(n_duty_corrected == 2, "input duty errors not both corrected");
    check(n_resets == 1, "reset not applied");
    $display("mechanisms: rows 00=%0d 01=%0d 10=%0d 11=%0d, held0=%0d held1=%0d, rises=%0d falls=%0d, periods=%0d, duty-corrected phases=%0d, resets=%0d",
             row_count[0], row_count[1], row_count[2], row_count[3], hold_of[0], hold_of[1],
             n_out_rise, n_out_fall, n_periods, n_duty_corrected, n_resets);
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
