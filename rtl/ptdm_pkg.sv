// ptdm_pkg: sizes and shared types of the serial switching matrix for
// Programmable Time-Division Multiplexing (PTDM).
//
// The default sizes are the worked example of the design: frames of F = 200
// bits, I = O = 10 incoming and outgoing lines (about ten T-1 carriers), and
// permuter control-store words of ceil(log2 F) = 8 bits. The permuter state
// encoding is this design's own.
package ptdm_pkg;

  // Frame width F in bits.
  parameter int unsigned FRAME_BITS = 200;
  // Number of incoming lines I.
  parameter int unsigned NUM_IN     = 10;
  // Number of outgoing lines O.
  parameter int unsigned NUM_OUT    = 10;

  // States of one permuter.
  //   PERM_IDLE : PFR empty (or being filled by the routing pass)
  //   PERM_DP   : 'data present' set on the PFR, waiting for its FAR to be free
  //   PERM_RUN  : shifting the PFR out and steering bits onto the FAR bus
  typedef enum logic [1:0] {
    PERM_IDLE = 2'd0,
    PERM_DP   = 2'd1,
    PERM_RUN  = 2'd2
  } perm_state_e;

endpackage
