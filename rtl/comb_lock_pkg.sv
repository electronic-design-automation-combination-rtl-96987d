// Shared types of the combination lock.
//
// The lock has eight states, A to H. State A means no useful input has been
// seen yet; each later letter means one more symbol of the combination 0110111
// has been received (B: "0", C: "01", ... H: "0110111"). A final X=0 in state H
// opens the lock. The letters and their meanings follow the lock's state and
// output table; the 3-bit binary encoding in alphabetical order is this
// design's own choice.
package comb_lock_pkg;

  typedef enum logic [2:0] {
    ST_A = 3'd0,  // got nothing
    ST_B = 3'd1,  // got 0
    ST_C = 3'd2,  // got 01
    ST_D = 3'd3,  // got 011
    ST_E = 3'd4,  // got 0110
    ST_F = 3'd5,  // got 01101
    ST_G = 3'd6,  // got 011011
    ST_H = 3'd7   // got 0110111
  } state_e;

endpackage
