// tb_odd_freq_divider_ratios: the divider at other odd ratios.
//
// Instances with N = 3, 7, 9, 11 and 15 run from one clk_in with a 10 ns
// period. With a 50% input, each clk_out must be high and low for N*5 ns
// each. With a 60% input it must be high for (N-1)/2*10 + 6 ns, so the 10%
// input error shrinks to 10%/N. Each rise of clk_out must fall on a rising
// edge of clk_in, and each fall on a falling edge. N = 9 and N = 15 have
// lock-up states in the counter; the reset makes them start in the cycle.
// A watchdog ends the run after a fixed time.
`timescale 1ns / 1ps

module tb_odd_freq_divider_ratios;

  localparam int NUM = 5;
  localparam int NS[NUM] = '{3, 7, 9, 11, 15};
  localparam time PERIOD = 10;

  logic clk_in = 1'b0;
  logic rst_n = 1'b0;
  time t_high = 5;
  bit measure = 1'b0;

  int checks = 0;
  int failures = 0;

  initial begin
    forever begin
      clk_in = 1'b1;
      #(t_high);
      clk_in = 1'b0;
      #(PERIOD - t_high);
    end
  end

  time t_in_rise = 0, t_in_fall = 0;
  always @(posedge clk_in) t_in_rise = $time;
  always @(negedge clk_in) t_in_fall = $time;

  int good_periods[NUM];
  int bad[NUM];
  int edge_checks[NUM];

  for (genvar i = 0; i < NUM; i++) begin : g_dut
    localparam time NT = time'(NS[i]);
    logic x, y, clk_out;
    time t_rise = 0, t_fall = 0;

    odd_freq_divider #(.N(NS[i])) dut (
        .clk_in (clk_in),
        .rst_n  (rst_n),
        .x      (x),
        .y      (y),
        .clk_out(clk_out)
    );

    always @(posedge clk_out) begin
      edge_checks[i]++;
      if (!(clk_in && t_in_rise == $time)) bad[i]++;
      if (measure && t_fall > t_rise) begin
        if ($time - t_rise != NT * PERIOD ||
            $time - t_fall != NT * PERIOD - ((NT - 1) / 2 * PERIOD + t_high)) begin
          bad[i]++;
          $display("FAIL N=%0d: period %0t, low %0t", NS[i], $time - t_rise, $time - t_fall);
        end else good_periods[i]++;
      end
      t_rise = $time;
    end

    always @(negedge clk_out) begin
      edge_checks[i]++;
      if (!(!clk_in && t_in_fall == $time)) bad[i]++;
      if (measure && t_rise > t_fall && $time - t_rise != (NT - 1) / 2 * PERIOD + t_high) begin
        bad[i]++;
        $display("FAIL N=%0d: high %0t", NS[i], $time - t_rise);
      end
      t_fall = $time;
    end
  end

  task automatic phase(time high);
    measure = 1'b0;
    @(negedge clk_in);
    t_high = high;
    repeat (40) @(posedge clk_in);
    #1;
    measure = 1'b1;
    repeat (15 * 12) @(posedge clk_in);
    #1;
  endtask

  initial begin
    for (int i = 0; i < NUM; i++) begin
      good_periods[i] = 0;
      bad[i] = 0;
      edge_checks[i] = 0;
    end
    repeat (2) @(negedge clk_in);
    rst_n = 1'b1;
    phase(5);
    phase(6);
    measure = 1'b0;
    for (int i = 0; i < NUM; i++) begin
      checks += edge_checks[i] + good_periods[i] + 1;
      failures += bad[i];
      // 180 measured cycles in each of the two phases, less one period each.
      if (good_periods[i] < 2 * (180 / NS[i] - 1)) begin
        failures++;
        $display("FAIL N=%0d: only %0d good periods", NS[i], good_periods[i]);
      end
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
