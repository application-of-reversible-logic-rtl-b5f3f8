// gcd_pkg: state encoding shared by the GCD control unit's sub-units.
// IDLE waits for start after reset; LOAD copies the operands into X and Y;
// TEST compares (Y == 0 ends, X < Y swaps, otherwise subtracts); SWAP exchanges
// X and Y; SUB replaces X by X - Y; DONE presents X as the GCD until the next
// start. The binary 3-bit encoding is this design's choice.
package gcd_pkg;
  localparam int unsigned STATE_W = 3;

  typedef enum logic [STATE_W-1:0] {
    S_IDLE = 3'd0,
    S_LOAD = 3'd1,
    S_TEST = 3'd2,
    S_SWAP = 3'd3,
    S_SUB  = 3'd4,
    S_DONE = 3'd5
  } gcd_state_e;
endpackage
