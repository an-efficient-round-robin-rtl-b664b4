// rr_pkg: types shared by the weighted round-robin arbiter.
//
// grant_state_e encodes the four states of the grant state machine
// (Reset, Grant Process, Get Weight, Count). The state names follow the
// arbiter's published state diagram; the binary encoding is this design's
// own choice.
package rr_pkg;

  typedef enum logic [1:0] {
    ST_RESET         = 2'd0,
    ST_GRANT_PROCESS = 2'd1,
    ST_GET_WEIGHT    = 2'd2,
    ST_COUNT         = 2'd3
  } grant_state_e;

endpackage
