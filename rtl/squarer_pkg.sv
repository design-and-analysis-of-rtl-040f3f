// Shared types for the squarer family.
//
// adder_e selects which of the five parallel-adder structures builds the
// middle-stage adder of each squarer (the 4-bit adder in the 4-bit squarer,
// the 8-bit adder in the 8-bit squarer, and so on). The five structures are
// the ones the squarer is compared over; carry look-ahead is the default
// because it gave the best overall results. The enum encoding is this
// design's own choice.
package squarer_pkg;

  typedef enum logic [2:0] {
    ADD_RCA  = 3'd0,  // ripple carry
    ADD_CLA  = 3'd1,  // carry look-ahead
    ADD_CSKA = 3'd2,  // carry skip
    ADD_CSEL = 3'd3,  // carry select
    ADD_CIA  = 3'd4   // carry increment
  } adder_e;

  // Block size used by the blocked adders (skip, select, increment) for an
  // adder of the given width: 4-bit blocks, or 2-bit blocks for adders of
  // 4 bits and less so that there are at least two blocks.
  function automatic int unsigned adder_block(int unsigned width);
    return (width <= 4) ? 2 : 4;
  endfunction

endpackage
