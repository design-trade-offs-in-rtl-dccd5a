// kmeans_pkg: types and helpers shared by the K-Means accelerator modules.
// The iteration phases of the top-level controller and a width helper that
// never returns 0 (so a one-entry memory still gets a one-bit address) are
// this design's own choices; the paper does not describe the sequencing.
package kmeans_pkg;

  // Phase of one Lloyd iteration as sequenced by kmeans_top.
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,  // waiting for start; centroid memory open to the host
    PH_CLEAR = 3'd1,  // zeroing the point accumulation memory and counters
    PH_RUN   = 3'd2,  // distance, comparison and accumulation of every point
    PH_DIV   = 3'd3   // division of sums by counts, new centroids written
  } phase_t;

  // Address width for a memory of `depth` words, at least one bit.
  function automatic int unsigned aw(input int unsigned depth);
    return (depth > 1) ? $clog2(depth) : 1;
  endfunction

endpackage
