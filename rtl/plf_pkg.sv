// plf_pkg: types and constants shared by the phylogenetic likelihood (PLF)
// accelerator. A probability value is an IEEE-754 binary64 word. One
// alignment site of an ancestral probability vector holds NRATES Gamma rate
// categories of NSTATES nucleotide probabilities (4 x 4 = 16 doubles).
// The left and right transition matrices hold one NSTATES x NSTATES matrix
// per rate category (64 doubles each); the inverted eigenvector matrix is a
// single NSTATES x NSTATES matrix (16 doubles).
// The scaling threshold follows RAxML: a site whose entries are all below
// 2^-256 in magnitude is multiplied by 2^256 and its weight is added to the
// scaling counter. The sizes follow the architecture (DNA, four Gamma rates);
// the threshold and the memory layout are RAxML's conventions.
package plf_pkg;

  typedef logic [63:0] f64_t;

  localparam int NSTATES     = 4;
  localparam int NRATES      = 4;
  localparam int SITE_DBL    = NSTATES * NRATES;           // 16
  localparam int MAT_DBL     = NRATES * NSTATES * NSTATES; // 64
  localparam int EV_DBL      = NSTATES * NSTATES;          // 16

  // Biased exponent of 2^-256 and the exponent step of a 2^256 multiply.
  localparam int unsigned MINLIK_EXP = 1023 - 256;
  localparam int unsigned SCALE_EXP  = 256;

  // Flattened indices into the matrix register files.
  // P[k][u][s]: rate k, parent state u, child state s.
  function automatic int pidx(input int k, input int u, input int s);
    return k * EV_DBL + u * NSTATES + s;
  endfunction

  // EV[j][l]: row j (product term), column l (output state).
  function automatic int evidx(input int j, input int l);
    return j * NSTATES + l;
  endfunction

endpackage
