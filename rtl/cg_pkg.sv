// Shared types of the clock-gated streaming stage.
//
// cg_state_e names the five states of the clock enabling controller. The
// state names are the ones of the state diagram the design follows; the
// binary encoding is this design's own choice.
package cg_pkg;

  typedef enum logic [2:0] {
    ST_INIT          = 3'd0,
    ST_SPACE         = 3'd1,
    ST_AFULL_DISABLE = 3'd2,
    ST_FULL          = 3'd3,
    ST_AFULL_ENABLE  = 3'd4
  } cg_state_e;

endpackage
