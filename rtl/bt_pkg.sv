// bt_pkg: types shared by the testor-search engine (BT algorithm).
//
// Candidates and matrix rows are N-bit vectors. Bit N-1 holds column 1 (the
// leftmost feature x1) and bit 0 holds column N (the rightmost feature xN), so
// the binary order of the N-tuples used by the BT algorithm is the natural
// unsigned order of these vectors, and "the last 1" of a tuple is its lowest
// set bit. Row 0 of a matrix is its top row.
package bt_pkg;

  // Run state of the candidate generator.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,  // waiting for start
    ST_RUN  = 2'd1,  // one candidate evaluated per clock
    ST_DONE = 2'd2   // search space exhausted; results held until next start
  } bt_state_e;

endpackage
