// plf_site_scale: numerical scaling of one parent site, as RAxML does it.
// If every one of the 16 entries (4 rate categories x 4 states) has a
// magnitude below 2^-256 (biased exponent below 767; zero counts as small),
// all entries are multiplied by 2^256, which is exact and is done by adding
// 256 to each non-zero biased exponent, and the site weight is reported so
// that the caller can add it to the scaling counter. Otherwise the site
// passes unchanged and the reported weight is 0.
// Purely combinational. The architecture states only that results are scaled
// when needed using a per-site weight vector; the rule is RAxML's.
module plf_site_scale
  import plf_pkg::*;
(
  input  f64_t [SITE_DBL-1:0] site_in,
  input  logic [31:0]         weight,
  output f64_t [SITE_DBL-1:0] site_out,
  output logic                scaled,
  output logic [31:0]         add_weight
);

  always_comb begin
    scaled = 1'b1;
    for (int i = 0; i < SITE_DBL; i++)
      if (site_in[i][62:52] >= 11'(MINLIK_EXP)) scaled = 1'b0;
    for (int i = 0; i < SITE_DBL; i++) begin
      site_out[i] = site_in[i];
      if (scaled && site_in[i][62:52] != 11'd0)
        site_out[i][62:52] = site_in[i][62:52] + 11'(SCALE_EXP);
    end
    add_weight = scaled ? weight : 32'd0;
  end

endmodule
