// median_pkg: constants and helpers shared by the rank-based running median filter.
//
// The filter keeps N samples, each with a rank from 1 (smallest) to N (largest); rank 0
// marks a cell that has not yet received a sample. A rank therefore needs enough bits to
// hold the values 0..N, which rank_width() returns. The defaults (window of 5 samples,
// 8-bit samples) are the main configuration of the design; a window of 9 and 16-bit
// samples are the other configurations it is meant for.
package median_pkg;

  parameter int unsigned DEFAULT_N     = 5;
  parameter int unsigned DEFAULT_WIDTH = 8;

  // Bits needed to hold a rank 0..n.
  function automatic int unsigned rank_width(input int unsigned n);
    return $clog2(n + 1);
  endfunction

  // Rank of the median cell of an odd window.
  function automatic int unsigned median_rank(input int unsigned n);
    return (n + 1) / 2;
  endfunction

endpackage
