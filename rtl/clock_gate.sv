// clock_gate: flip-flop based glitch-free clock gate.
//
// The enable is captured on the falling edge of the master clock and the
// gated clock is the master clock AND-ed with that flip-flop's output:
//   gclk = clk & q,  q <= en on negedge clk.
// Because q changes only while clk is low, gclk can never be cut short or
// produce a spurious pulse. An enable that is stable before the falling edge
// of cycle n lets through (or suppresses) the rising edge that ends cycle n.
// The asynchronous active-low reset turns the clock off. In silicon or on an
// FPGA the AND would be a dedicated clock buffer cell.
module clock_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic gclk
);
  logic q;

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) q <= 1'b0;
    else        q <= en;

  assign gclk = clk & q;
endmodule
