// Shared types of the bypass-zero, feed-A-directly (BZ-FAD) shift-and-add multiplier.
//
// The multiplier has only two operating states: idle (waiting for a start
// request, holding the last product) and run (one ring-counter cycle per
// multiplier bit). The encoding is this design's own choice.
package bzfad_pkg;

  typedef enum logic {
    ST_IDLE = 1'b0,  // waiting for start, product outputs hold the last result
    ST_RUN  = 1'b1   // processing multiplier bit i, where ring-counter bit i is hot
  } state_e;

endpackage
