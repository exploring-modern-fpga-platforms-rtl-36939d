// plf_rcu: rate-category unit of the PLF execution pipeline. For one Gamma
// rate category of one alignment site it evaluates Eq. 2 of Felsenstein's
// pruning step and the eigenvector back-transform:
//   al[u] = sum_s PL[u][s] * vl[s]      (4 dot products, left child)
//   ar[u] = sum_s PR[u][s] * vr[s]      (4 dot products, right child)
//   x[u]  = al[u] * ar[u]
//   y[l]  = sum_j x[j] * EV[j][l]       (inverted eigenvector product)
// Each sum is a four-multiplier array with a logarithmic adder tree
// (fp64_dot4). All operations of a rate category run in parallel, so the unit
// accepts one rate category per enabled cycle.
// Interface: vl/vr child entries (4 doubles each), pl/pr the 4x4 matrices of
// this rate category (flattened u*4+s), ev the 4x4 inverted eigenvector
// matrix (flattened j*4+l). pl/pr are sampled with vl/vr; ev is sampled 8
// cycles later, so it must be held steady while data is in flight (it is a
// register file loaded before streaming).
// Timing: LATENCY = 14 enabled cycles (6 dot + 2 multiply + 6 dot).
module plf_rcu
  import plf_pkg::*;
(
  input  logic        clk,
  input  logic        en,
  input  f64_t [3:0]  vl,
  input  f64_t [3:0]  vr,
  input  f64_t [15:0] pl,
  input  f64_t [15:0] pr,
  input  f64_t [15:0] ev,
  output f64_t [3:0]  y
);

  localparam int LATENCY = 14;

  f64_t [3:0] al, ar, x;

  for (genvar u = 0; u < 4; u++) begin : g_state
    fp64_dot4 u_left  (.clk, .en, .a(vl), .b(pl[u*4 +: 4]), .y(al[u]));
    fp64_dot4 u_right (.clk, .en, .a(vr), .b(pr[u*4 +: 4]), .y(ar[u]));
    fp64_mul  u_prod  (.clk, .en, .a(al[u]), .b(ar[u]), .y(x[u]));
  end

  for (genvar l = 0; l < 4; l++) begin : g_ev
    f64_t [3:0] col;
    always_comb
      for (int j = 0; j < 4; j++) col[j] = ev[evidx(j, l)];
    fp64_dot4 u_ev (.clk, .en, .a(x), .b(col), .y(y[l]));
  end

endmodule
