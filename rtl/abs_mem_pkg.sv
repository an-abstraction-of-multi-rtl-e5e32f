// abs_mem_pkg: types shared by the abstract memory blocks.
//
// coll_policy_e selects what a cell receives when several write ports store
// into it in the same cycle: the lowest-numbered port wins (COLL_PRIORITY),
// or an unconstrained value taken from the write ports' free inputs
// (COLL_RANDOM). endian_e selects how a multi-unit access is laid out over
// consecutive least-addressable-unit cells. Both variants of each are the
// ones the abstraction method defines; the encodings are this design's.
package abs_mem_pkg;

  typedef enum logic {
    COLL_PRIORITY = 1'b0,  // lowest-numbered write port wins
    COLL_RANDOM   = 1'b1   // an unconstrained (free) value is stored
  } coll_policy_e;

  typedef enum logic {
    ENDIAN_LITTLE = 1'b0,  // unit chunk j at address + j - 1
    ENDIAN_BIG    = 1'b1   // unit chunk j at address + unit - j
  } endian_e;

endpackage
