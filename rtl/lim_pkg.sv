// Shared types and constants of the logic-in-memory XNOR-Net.
//
// The XNOR-Net computes, for every word of an N-bit x M-word binary input
// feature map (IFMAP), the binary convolution with an N-bit weight word K:
// OFMAP[w] = (number of 1s) - (number of 0s) of XNOR(IFMAP[w], K)
//          = 2*popcount(XNOR(IFMAP[w], K)) - N.
// This package holds the control-unit state encodings of the two versions
// (the free-running first version and the bus-controlled upgraded version)
// and the width helper for the signed result.  The state names follow the
// design description; the numeric encodings are this design's own.
package lim_pkg;

  // States of the first, free-running control unit (six states).
  typedef enum logic [2:0] {
    V1_RESET             = 3'd0,
    V1_IDLE              = 3'd1,
    V1_FILLING_XNOR      = 3'd2,
    V1_PRE_POP_COMPUTING = 3'd3,
    V1_POP_COMPUTING     = 3'd4,
    V1_RESULTS           = 3'd5
  } cu_v1_state_e;

  // States of the upgraded control unit: IDLE is gone, the counters are
  // cleared in FILLING_XNOR instead.
  typedef enum logic [2:0] {
    CU_RESET             = 3'd0,
    CU_FILLING_XNOR      = 3'd2,
    CU_PRE_POP_COMPUTING = 3'd3,
    CU_POP_COMPUTING     = 3'd4,
    CU_RESULTS           = 3'd5
  } cu_state_e;

  // Width of a signed result able to hold -n .. +n.
  function automatic int unsigned ofmap_width(int unsigned n);
    return $clog2(n + 1) + 1;
  endfunction

  // Width of an index able to address `count` items (at least 1 bit).
  function automatic int unsigned idx_width(int unsigned count);
    return (count > 1) ? $clog2(count) : 1;
  endfunction

endpackage
