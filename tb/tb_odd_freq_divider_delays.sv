// tb_odd_freq_divider_delays: duty cycle of the divide-by-5 output with
// circuit delays, swept over the input frequency.
//
// The RTL has no delays. In silicon, x leaves the last counter flip-flop one
// clock-to-Q delay (TCQ) after the rising edge of clk_in. clk_out rises when x
// falls, so it rises TCQ late. It falls on a falling edge of clk_in, which has
// no such delay. The high time therefore shrinks to N/2*T - TCQ, and the duty
// cycle drops by TCQ/(N*T) as the frequency rises. A buffer of delay TBUF
// between clk_in and the trimming stage delays the falling edge as well. This
// gives N/2*T - TCQ + TBUF, and with TBUF close to TCQ it cancels the error.
//
// Two behavioural delay models sit around the RTL blocks: a transport delay
// of TCQ on x, and the clock buffer. TCQ = 25 ps is an assumed value. It is
// the delay that gives 49.5% at 1 GHz. Chain 0 has no buffer. Chain 1 has a
// buffer of TCQ - 1 ps, kept just below TCQ so that the buffered clock always
// moves before x.
// The sweep runs from 20 MHz to 3 GHz. At each step, the high time and the
// period of clk_out are checked against the formula, to the picosecond, on
// both chains. A watchdog ends the run after a fixed time.
`timescale 1ns / 1ps

module tb_odd_freq_divider_delays;

  localparam int N = 5;
  localparam realtime TCQ = 0.025;
  localparam realtime TBUF[2] = '{0.0, 0.024};
  localparam int NSTEP = 8;
  // Input periods in ns: 20 MHz, 50 MHz, 100 MHz, 200 MHz, 500 MHz, 1 GHz, 2 GHz, 3 GHz.
  localparam realtime PERIODS[NSTEP] = '{50.0, 20.0, 10.0, 5.0, 2.0, 1.0, 0.5, 0.334};

  logic clk_in = 1'b0;
  logic rst_n = 1'b0;
  realtime half = 25.0;
  bit measure = 1'b0;

  int checks = 0;
  int failures = 0;

  initial begin
    forever begin
      clk_in = 1'b1;
      #(half);
      clk_in = 1'b0;
      #(half);
    end
  end

  logic x;  // counter output without delay
  logic x_d;  // counter output after the flip-flop's clock-to-Q delay

  odd_div_counter #(.N(N)) u_counter (
      .clk_in(clk_in),
      .rst_n (rst_n),
      .x     (x)
  );

  always @(x) x_d <= #(TCQ) x;

  realtime t_rise[2], t_fall[2], high_time[2], period[2];
  int n_meas[2];

  for (genvar c = 0; c < 2; c++) begin : g_chain
    logic clk_b;  // clk_in after the optional buffer
    logic clk_out;

    if (TBUF[c] > 0.0) begin : g_buf
      always @(clk_in) clk_b <= #(TBUF[c]) clk_in;
    end else begin : g_nobuf
      assign clk_b = clk_in;
    end

    duty_cycle_trim u_trim (
        .clk_in (clk_b),
        .x      (x_d),
        .y      (),
        .clk_out(clk_out)
    );

    always @(posedge clk_out) begin
      if (measure && t_fall[c] > t_rise[c]) begin
        period[c] = $realtime - t_rise[c];
        n_meas[c]++;
      end
      t_rise[c] = $realtime;
    end
    always @(negedge clk_out) begin
      if (measure && t_rise[c] > t_fall[c]) high_time[c] = $realtime - t_rise[c];
      t_fall[c] = $realtime;
    end
  end

  function automatic bit close(realtime a, realtime b);
    return (a - b < 0.0005) && (b - a < 0.0005);
  endfunction

  initial begin
    for (int c = 0; c < 2; c++) begin
      t_rise[c] = 0.0;
      t_fall[c] = 0.0;
      n_meas[c] = 0;
    end
    repeat (2) @(negedge clk_in);
    rst_n = 1'b1;
    for (int s = 0; s < NSTEP; s++) begin
      measure = 1'b0;
      @(negedge clk_in);
      half = PERIODS[s] / 2.0;
      repeat (4 * N) @(posedge clk_in);
      measure = 1'b1;
      for (int c = 0; c < 2; c++) n_meas[c] = 0;
      repeat (4 * N) @(posedge clk_in);
      #(TCQ + 0.001);
      for (int c = 0; c < 2; c++) begin
        realtime exp_high;
        exp_high = N * PERIODS[s] / 2.0 - TCQ + TBUF[c];
        checks++;
        if (n_meas[c] < 3 || !close(period[c], N * PERIODS[s]) || !close(high_time[c], exp_high)) begin
          failures++;
          $display("FAIL T=%0.3f ns, buffer %0.3f ns: high %0.4f (expected %0.4f), period %0.4f, %0d periods",
                   PERIODS[s], TBUF[c], high_time[c], exp_high, period[c], n_meas[c]);
        end
      end
      $display("f_in = %7.1f MHz: duty %6.3f %% without buffer, %6.3f %% with buffer",
               1000.0 / PERIODS[s], 100.0 * high_time[0] / period[0],
               100.0 * high_time[1] / period[1]);
    end
    // The value the delay was chosen to give: 49.5% at 1 GHz without buffer.
    checks++;
    if (!close(100.0 * (N * 1.0 / 2.0 - TCQ) / (N * 1.0), 49.5)) begin
      failures++;
      $display("FAIL 1 GHz duty formula");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
