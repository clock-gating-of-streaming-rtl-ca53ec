// Clock enabling controller: a five-state Moore machine that decides whether
// the clock of an actor may run, from the full (F) and almost-full (AF) flags
// of the FIFO queue the actor writes into.
//
// States and enable (EN) per state, as in the design's state diagram:
//   INIT           EN=1  leaves for SPACE once F=0 and AF=0
//   SPACE          EN=1  queue has room; goes to AFULL_DISABLE on F=0, AF=1
//   AFULL_DISABLE  EN=0  one place left; back to SPACE on F=0, AF=0,
//                        on to FULL on F=1, AF=1, stays on F=0, AF=1
//   FULL           EN=0  queue full; stays on F=1, AF=1,
//                        goes to AFULL_ENABLE on F=0, AF=1
//   AFULL_ENABLE   EN=1  one place free again; SPACE on F=0, AF=0,
//                        FULL on F=1, AF=1, stays on F=0, AF=1
// EN is switched off already at "almost full": the enable passes through a
// re-timing flip-flop and the clock buffer before it stops the clock, so the
// early switch-off is the conservative choice. Any flag combination that the
// diagram does not list for a state (e.g. F=1, AF=0, which a queue never
// shows) keeps the state; that, the synchronous active-high reset and the
// state encoding are this design's own choices.
//
// Timing: state and EN are registered; EN reacts one clock after the flags.
module clock_enable_controller
  import cg_pkg::*;
(
  input  logic      clk,
  input  logic      rst,    // synchronous, active high
  input  logic      f,      // output queue full
  input  logic      af,     // output queue almost full (one or no place left)
  output logic      en,     // clock enable request
  output cg_state_e state   // current state, for observation
);

  cg_state_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_INIT:          if (!f && !af) state_d = ST_SPACE;
      ST_SPACE:         if (!f &&  af) state_d = ST_AFULL_DISABLE;
      ST_AFULL_DISABLE: if (!f && !af) state_d = ST_SPACE;
                        else if (f && af) state_d = ST_FULL;
      ST_FULL:          if (!f &&  af) state_d = ST_AFULL_ENABLE;
      ST_AFULL_ENABLE:  if (!f && !af) state_d = ST_SPACE;
                        else if (f && af) state_d = ST_FULL;
      default:          state_d = ST_INIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state_q <= ST_INIT;
    else     state_q <= state_d;
  end

  assign en    = (state_q != ST_AFULL_DISABLE) && (state_q != ST_FULL);
  assign state = state_q;

endmodule
