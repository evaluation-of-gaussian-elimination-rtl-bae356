// Shared types for the GF(2) Gaussian-elimination accelerator.
//
// dp_op_t is the operation the elimination datapath applies to the W-bit
// block that the matrix store returns in the current cycle. The encoding
// is this design's own choice.
package gauss_pkg;

  typedef enum logic [2:0] {
    DP_IDLE = 3'd0,  // nothing in flight
    DP_LOAD = 3'd1,  // copy the block into the pivot-row cache
    DP_FWD  = 3'd2,  // forward elimination: pivot ^= row & mask
    DP_BWD  = 3'd3,  // backward substitution: row ^= pivot & mask, write back
    DP_PIV  = 3'd4   // write the cached pivot row back to its own slot
  } dp_op_t;

endpackage
