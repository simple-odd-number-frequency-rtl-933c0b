// odd_div_counter: odd-modulus clock divider (divide-by-N, N odd, default 5).
//
// How it works: K = (N+1)/2 flip-flops, all on the rising edge of clk_in, form
// a shift chain q[0] -> q[1] -> ... -> q[K-1]. The first stage loads the NAND
// of the last two stages. A plain twisted-ring (Johnson) counter of K stages
// would count 2K; the NAND lets the first stage load a 1 one cycle early,
// which skips one state and leaves a cycle of 2K-1 = N states. The output x is
// the last stage. It is high for K = (N+1)/2 input cycles and low for
// (N-1)/2, so its duty cycle is (N+1)/(2N): 60% for N = 5.
//
// For N = 5 this is exactly three DFFs and one NAND gate, DFF1 -> DFF2 -> DFF3,
// with NAND(DFF2.Q, DFF3.Q) fed back to DFF1.D and X = DFF3.Q. That structure
// is the published divide-by-5 circuit. Generalising it to any odd N by
// lengthening the chain is this design's own choice.
//
// Reset: rst_n is an asynchronous active-low reset that clears every stage.
// It is an addition of this design. With N = 5 the circuit also starts by
// itself: every one of the 8 states reaches the 5-state cycle within two
// clocks. For some longer chains (N = 9, 15) there are lock-up states, so the
// reset is needed there.
//
// Interface and timing:
//   clk_in  input clock; every stage is clocked on its rising edge
//   rst_n   asynchronous reset, active low; the state is all zeros after it
//   x       divided clock; it changes only just after a rising edge of clk_in.
//           After reset it goes high on the K-th rising edge, then repeats
//           K cycles high and K-1 cycles low.
`timescale 1ns / 1ps

module odd_div_counter #(
    parameter int unsigned N = 5  // division ratio, odd and at least 3
) (
    input  logic clk_in,
    input  logic rst_n,
    output logic x
);

  localparam int unsigned K = (N + 1) / 2;  // number of flip-flops

  if ((N % 2) == 0 || N < 3) begin : g_bad_n
    $fatal(1, "odd_div_counter: N must be odd and at least 3");
  end

  logic [K-1:0] q;  // q[0] is the first stage, q[K-1] drives x

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else q <= {q[K-2:0], ~(q[K-2] & q[K-1])};
  end

  assign x = q[K-1];

endmodule
