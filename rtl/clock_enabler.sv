// Clock enabler of one actor: the clock enabling controller, a D flip-flop
// and a clock buffer with enable, chained as in the design's block diagram.
//
// The controller computes EN from the F and AF flags of the actor's output
// queue. The flip-flop re-times EN onto the free-running clock, because the
// enable of the clock buffer has to be synchronous to the clock it gates.
// The buffer then passes or stops the clock of the actor.
//
// Outputs: gclk, the actor's clock; ce, the re-timed enable. ce also tells
// the logic on the free-running clock, cycle by cycle, whether the actor's
// clock has an edge at the coming clock edge (gclk rises at edge k exactly
// when ce is high in the cycle before edge k), which the queues use to take
// the actor's transfers only on edges the actor itself sees.
// Timing: from a change of AF to a change of gclk takes three clock edges:
// one into the controller state, one through the flip-flop, and the buffer
// acts on the edge after that. The flip-flop resets to 1 (clock running),
// matching the controller's reset state INIT with EN=1; that reset value is
// this design's own choice.
module clock_enabler
  import cg_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      f,
  input  logic      af,
  output logic      en,
  output logic      ce,
  output logic      gclk,
  output cg_state_e state
);

  clock_enable_controller u_ctrl (
    .clk   (clk),
    .rst   (rst),
    .f     (f),
    .af    (af),
    .en    (en),
    .state (state)
  );

  always_ff @(posedge clk) begin
    if (rst) ce <= 1'b1;
    else     ce <= en;
  end

  clock_buffer_ce u_bufgce (
    .i  (clk),
    .ce (ce),
    .o  (gclk)
  );

endmodule
