// Shared types of the security-aware data cache.
//
// The cache classifies every access into one of four outcomes: a hit, a
// tag miss (the index is mapped to a line of the same context but no set of
// that line holds the tag), an index miss (no line-number register holds the
// index) and a context miss (the index is mapped, but the stored line and
// the request belong to different contexts and one of them is protected).
// The three miss kinds are the ones of the SecRAND replacement algorithm;
// the encoding of the enum is this design's own choice.
package sac_pkg;

  typedef enum logic [1:0] {
    ACC_HIT     = 2'd0,
    ACC_TAG_MISS = 2'd1,
    ACC_IDX_MISS = 2'd2,
    ACC_CTX_MISS = 2'd3
  } acc_kind_e;

  // Controller states (see secrand_ctrl).
  typedef enum logic [2:0] {
    ST_INIT    = 3'd0,
    ST_IDLE    = 3'd1,
    ST_LOOKUP  = 3'd2,
    ST_FILL    = 3'd3,
    ST_FILL_WR = 3'd4,
    ST_UNCACHED = 3'd5,
    ST_MEM_WR  = 3'd6
  } ctrl_state_e;

endpackage
