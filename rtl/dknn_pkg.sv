// dknn_pkg: constants shared by the DKNN classifier and its diagnosis front end.
//
// The classifier dimensions are the baseline configuration of the design:
// M = 10 features (one fault count per independently repairable sub-circuit),
// K = 5 nearest neighbours, N = 256 training vectors. The feature width is this
// design's own choice (8-bit unsigned fault counts). The partial-distance width
// follows the rule "input bits + log2(M) + 1", which covers a full Manhattan sum.
package dknn_pkg;

  localparam int unsigned DKNN_M      = 10;
  localparam int unsigned DKNN_K      = 5;
  localparam int unsigned DKNN_N      = 256;
  localparam int unsigned DKNN_FEAT_W = 8;

  // Diagnosis front end: number of dictionary tests and of dictionary faults.
  localparam int unsigned CASP_NUM_TESTS  = 64;
  localparam int unsigned CASP_NUM_FAULTS = 64;

  // Width of a Manhattan distance over m features of feat_w bits.
  function automatic int unsigned dist_width(int unsigned feat_w, int unsigned m);
    return feat_w + $clog2(m) + 1;
  endfunction

  // Width of an index into n items (at least one bit).
  function automatic int unsigned idx_width(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
