// Shared types of the latency-insensitive building blocks.
//
// rs_state_t is the state of a relay station (see relay_station.sv). The four
// states and their meaning follow the relay-station state chart: empty (no
// token), half (one token in the main register), full (a second token in the
// auxiliary register, back-pressure raised) and error (a token was offered
// while back-pressure was raised, which the protocol forbids).
package lid_pkg;

  typedef enum logic [1:0] {
    RS_EMPTY = 2'd0,
    RS_HALF  = 2'd1,
    RS_FULL  = 2'd2,
    RS_ERROR = 2'd3
  } rs_state_t;

endpackage
