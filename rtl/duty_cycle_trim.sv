// duty_cycle_trim: turns the uneven output of an odd divider into a 50% clock.
//
// How it works: a single storage node y is written with x whenever clk_in and
// x differ, and keeps its value whenever they are equal. The output is the
// inverse of y:
//
//   clk_in  x   clk_out
//     0     0   hold
//     0     1   0
//     1     0   1
//     1     1   hold
//
// or in short: if clk_in != x then clk_out = clk_in. In silicon this is two
// pass transistors and a pair of cross-coupled inverters. An NMOS device with
// its gate on clk_in conducts well when clk_in = 1 and x = 0. A PMOS device
// with its gate on clk_in conducts well when clk_in = 0 and x = 1. Both drive
// y from x. A strong inverter drives clk_out from y, and a weak inverter
// feeds clk_out back to y to hold the value. The truth table and the circuit
// follow the published design. Here the storage node is written as a
// level-sensitive latch, with enable (clk_in ^ x) and data x. That RTL form is
// this design's own choice.
//
// Why it gives 50%: the odd counter changes x only on rising edges of clk_in.
// x is high for (N+1)/2 cycles and low for (N-1)/2 cycles. clk_out rises
// when x falls, because clk_in is then 1 and differs from x. clk_out then
// stays high through the (N-1)/2 low cycles of x. It falls at the first falling
// edge of clk_in after x has risen again, half a cycle later. So it is high for
// (N-1)/2 + 1/2 = N/2 input periods. If clk_in itself is not 50%, the error
// is divided by N.
//
// Interface and timing:
//   clk_in   input clock (the gates of the two pass devices)
//   x        divided clock from the odd counter
//   y        the storage node; y is always the inverse of clk_out
//   clk_out  trimmed output. It has no delay of its own in this model: it
//            changes with x (rising) or with clk_in (falling).
//
// Circuit warnings: the latch is intended. It is the circuit. Its enable is
// derived from its own data input, which mirrors the transistor circuit.
`timescale 1ns / 1ps

module duty_cycle_trim (
    input  logic clk_in,
    input  logic x,
    output logic y,
    output logic clk_out
);

  logic pass_on;  // one of the two pass devices conducts strongly

  assign pass_on = clk_in ^ x;

  always_latch begin
    if (pass_on) y = x;
  end

  assign clk_out = ~y;

endmodule
