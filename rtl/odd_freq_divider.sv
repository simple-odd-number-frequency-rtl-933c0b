// odd_freq_divider: odd number frequency divider with a 50% duty cycle.
//
// How it works: an odd counter (odd_div_counter), clocked on the rising edge
// of clk_in, makes x. x has period N input cycles but is high for (N+1)/2 of
// them (60% for the default N = 5). The duty cycle trimming stage
// (duty_cycle_trim) follows it. It copies clk_in to its output whenever clk_in
// differs from x, and holds its output otherwise. The output rises with the
// falling edge of x and falls half an input cycle before x would let it. This
// gives clk_out a high time of exactly N/2 input periods. The structure (a
// divide-by-5 counter of three flip-flops and a NAND gate, followed by the
// trimming stage) is the published design. The parameter N for other odd
// ratios and the counter reset are this design's own additions.
//
// Interface and timing:
//   clk_in   input clock
//   rst_n    asynchronous active-low reset of the counter
//   x        untrimmed divided clock; changes just after rising edges of clk_in
//   y        internal node of the trimming stage; the inverse of clk_out
//   clk_out  divided clock, period N * T(clk_in), high for N/2 * T(clk_in).
//            It rises with a rising edge of clk_in and falls with a falling
//            edge. While rst_n is low, x is low and clk_out goes high on
//            the first rising edge of clk_in. After the release, clk_out
//            falls N/2 input periods after the first rising edge of clk_in,
//            and the 50% waveform is exact from that edge on.
`timescale 1ns / 1ps

module odd_freq_divider #(
    parameter int unsigned N = 5  // division ratio, odd and at least 3
) (
    input  logic clk_in,
    input  logic rst_n,
    output logic x,
    output logic y,
    output logic clk_out
);

  odd_div_counter #(.N(N)) u_counter (
      .clk_in(clk_in),
      .rst_n (rst_n),
      .x     (x)
  );

  duty_cycle_trim u_trim (
      .clk_in (clk_in),
      .x      (x),
      .y      (y),
      .clk_out(clk_out)
  );

endmodule
