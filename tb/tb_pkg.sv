// tb_pkg: helpers shared by the testbenches: random binary64 operands within
// a chosen binary exponent range, and the reference arithmetic of the PLF
// datapath written with the simulator's own double-precision reals, in the
// same operation order as the hardware adder trees.
package tb_pkg;

  // Random double with unbiased exponent in [elo, ehi] and a random sign
  // when neg is set.
  function automatic logic [63:0] rand_f64(input int elo, input int ehi, input bit neg);
    logic [63:0] v;
    int e;
    e = elo + int'($urandom_range(ehi - elo));
    v[63]    = neg ? 1'($urandom_range(1)) : 1'b0;
    v[62:52] = 11'(e + 1023);
    v[51:32] = 20'($urandom);
    v[31:0]  = $urandom;
    return v;
  endfunction

  function automatic logic [63:0] rmul(input logic [63:0] a, input logic [63:0] b);
    return $realtobits($bitstoreal(a) * $bitstoreal(b));
  endfunction

  function automatic logic [63:0] radd(input logic [63:0] a, input logic [63:0] b);
    return $realtobits($bitstoreal(a) + $bitstoreal(b));
  endfunction

  // (a0*b0 + a1*b1) + (a2*b2 + a3*b3), the tree order of fp64_dot4.
  function automatic logic [63:0] rdot4(input logic [3:0][63:0] a, input logic [3:0][63:0] b);
    return radd(radd(rmul(a[0], b[0]), rmul(a[1], b[1])),
                radd(rmul(a[2], b[2]), rmul(a[3], b[3])));
  endfunction

  // One rate category of Eq. 2 followed by the eigenvector product.
  // lm/rm: 4x4 matrices P[u][s] flattened u*4+s; ev: EV[j][l] flattened j*4+l.
  function automatic logic [3:0][63:0] rrcu(input logic [3:0][63:0] vl,
                                            input logic [3:0][63:0] vr,
                                            input logic [15:0][63:0] lm,
                                            input logic [15:0][63:0] rm,
                                            input logic [15:0][63:0] ev);
    logic [3:0][63:0] x, y, row_l, row_r, col;
    for (int u = 0; u < 4; u++) begin
      for (int s = 0; s < 4; s++) begin
        row_l[s] = lm[u*4+s];
        row_r[s] = rm[u*4+s];
      end
      x[u] = rmul(rdot4(vl, row_l), rdot4(vr, row_r));
    end
    for (int l = 0; l < 4; l++) begin
      for (int j = 0; j < 4; j++) col[j] = ev[j*4+l];
      y[l] = rdot4(x, col);
    end
    return y;
  endfunction

  // A whole parent site: four rate categories of rrcu, then the RAxML
  // scaling rule (all 16 magnitudes below 2^-256 -> multiply by 2^256).
  function automatic bit rsite(input logic [15:0][63:0] vl, input logic [15:0][63:0] vr,
                               input logic [63:0][63:0] pl, input logic [63:0][63:0] pr,
                               input logic [15:0][63:0] ev, output logic [15:0][63:0] site);
    logic [3:0][63:0] a, b, y;
    logic [15:0][63:0] ml, mr;
    bit all_small;
    for (int k = 0; k < 4; k++) begin
      for (int i = 0; i < 4; i++) begin a[i] = vl[k*4+i]; b[i] = vr[k*4+i]; end
      for (int i = 0; i < 16; i++) begin ml[i] = pl[k*16+i]; mr[i] = pr[k*16+i]; end
      y = rrcu(a, b, ml, mr, ev);
      for (int i = 0; i < 4; i++) site[k*4+i] = y[i];
    end
    all_small = 1;
    for (int i = 0; i < 16; i++)
      if ($bitstoreal(site[i]) >= 2.0 ** (-256) || $bitstoreal(site[i]) <= -(2.0 ** (-256))) all_small = 0;
    if (all_small)
      for (int i = 0; i < 16; i++) site[i] = $realtobits($bitstoreal(site[i]) * (2.0 ** 256));
    return all_small;
  endfunction

  // Random child site: ordinary probabilities, or tiny ones that force scaling.
  function automatic logic [15:0][63:0] rand_site(input bit tiny);
    logic [15:0][63:0] v;
    for (int i = 0; i < 16; i++) v[i] = tiny ? rand_f64(-210, -200, 0) : rand_f64(-12, 0, 0);
    return v;
  endfunction

endpackage
