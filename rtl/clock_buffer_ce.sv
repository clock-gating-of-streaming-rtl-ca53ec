// Clock buffer with clock enable (the role of a global clock buffer with
// enable on an FPGA). While CE is high the output clock follows the input
// clock; while CE is low the output is held low. The design only requires that
// the buffer cut the clock cleanly and that its enable be synchronous to the
// input clock; the way it is built here is this design's own choice.
//
// How it works: CE is captured by a latch that is transparent while CLK is
// low, and the output is CLK AND the latched enable. CE can therefore only
// change the output while CLK is low, so no clock pulse is ever shortened.
// The latch is intended (a standard integrated clock gate); tools report it
// as a latch.
//
// Timing: a rising edge of CLK reaches O exactly when CE was high during the
// low phase before that edge. Given a CE that changes only just after rising
// edges of CLK (driven from a flip-flop on CLK), O has a rising edge at
// clock edge k if and only if CE was high in the cycle before edge k.
module clock_buffer_ce (
  input  logic i,    // input clock
  input  logic ce,   // clock enable, synchronous to i
  output logic o     // gated clock
);

  logic ce_lat;

  always_latch begin
    if (!i) ce_lat = ce;
  end

  assign o = i & ce_lat;

endmodule
