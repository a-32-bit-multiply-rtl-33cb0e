// mac_pkg: types shared by the MAC's control unit and its testbenches.
package mac_pkg;
  // Control unit states: waiting for start, taking operand pairs, waiting
  // for the last pair to reach the accumulator.
  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,
    ST_RUN   = 2'd1,
    ST_DRAIN = 2'd2
  } mac_state_e;
endpackage
