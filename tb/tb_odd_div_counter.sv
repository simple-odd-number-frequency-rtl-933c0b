// tb_odd_div_counter: self-checking test of the odd-modulus counter.
//
// Four instances are run side by side: N = 5 (the default), 3, 7 and 9, all
// reset together. A fifth N = 5 instance never sees a reset and starts from
// whatever state the simulator gives it, to show that the five-state cycle is
// reached on its own. The expected x is worked out from a formula, not from a
// model of the circuit. After reset, with K = (N+1)/2, x is 1 after rising
// edge c (c = 1, 2, ...) exactly when c >= K and (c - K) mod N < K. The
// period (N cycles) and the high time ((N+1)/2 cycles) of each divider are
// also measured from its edges. A watchdog ends the run after a fixed time.
`timescale 1ns / 1ps

module tb_odd_div_counter;

  localparam int NUM = 4;
  localparam int NS[NUM] = '{5, 3, 7, 9};
  localparam int CYCLES = 200;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NUM-1:0] x;
  logic x_free;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NUM; i++) begin : g_dut
    odd_div_counter #(.N(NS[i])) dut (
        .clk_in(clk),
        .rst_n (rst_n),
        .x     (x[i])
    );
  end

  odd_div_counter dut_free (
      .clk_in(clk),
      .rst_n (1'b1),
      .x     (x_free)
  );

  function automatic logic expected_x(int n, int c);
    int k = (n + 1) / 2;
    if (c < k) return 1'b0;
    return ((c - k) % n) < k;
  endfunction

  // Per-instance run lengths of x, counted in rising edges.
  int run_len[NUM];
  logic prev_x[NUM];
  int period_seen[NUM];

  int free_run = 0;
  logic free_prev = 1'b0;
  int free_high_runs = 0;
  int free_low_runs = 0;

  initial begin
    int c;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NUM; i++) begin
      run_len[i] = 0;
      prev_x[i] = 1'b0;
      period_seen[i] = 0;
    end
    for (c = 1; c <= CYCLES; c++) begin
      @(posedge clk);
      #1;
      for (int i = 0; i < NUM; i++) begin
        checks++;
        if (x[i] !== expected_x(NS[i], c)) begin
          failures++;
          $display("FAIL N=%0d edge %0d: x=%0b expected %0b", NS[i], c, x[i],
                   expected_x(NS[i], c));
        end
        // Measure run lengths once the counter is in its cycle.
        if (x[i] != prev_x[i]) begin
          if (c > 2 * NS[i]) begin
            checks++;
            if (prev_x[i] && run_len[i] != (NS[i] + 1) / 2) begin
              failures++;
              $display("FAIL N=%0d high run %0d", NS[i], run_len[i]);
            end else if (!prev_x[i] && run_len[i] != (NS[i] - 1) / 2) begin
              failures++;
              $display("FAIL N=%0d low run %0d", NS[i], run_len[i]);
            end else period_seen[i]++;
          end
          run_len[i] = 1;
        end else run_len[i]++;
        prev_x[i] = x[i];
      end
      // Free-running N = 5 instance: after 10 edges its runs must be 3 and 2.
      if (x_free != free_prev) begin
        if (c > 10) begin
          checks++;
          if (free_prev && free_run != 3) begin
            failures++;
            $display("FAIL free-running high run %0d", free_run);
          end else if (!free_prev && free_run != 2) begin
            failures++;
            $display("FAIL free-running low run %0d", free_run);
          end else if (free_prev) free_high_runs++;
          else free_low_runs++;
        end
        free_run = 1;
      end else free_run++;
      free_prev = x_free;
    end
    // Every divider must have shown many whole runs.
    for (int i = 0; i < NUM; i++) begin
      checks++;
      if (period_seen[i] < 2 * (CYCLES / NS[i]) - 6) begin
        failures++;
        $display("FAIL N=%0d only %0d good runs", NS[i], period_seen[i]);
      end
    end
    checks++;
    if (free_high_runs < 30 || free_low_runs < 30) begin
      failures++;
      $display("FAIL free-running counter: %0d high, %0d low runs", free_high_runs,
               free_low_runs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (CYCLES + 100));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
