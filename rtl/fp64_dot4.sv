// fp64_dot4: a multiplier array of four binary64 multipliers feeding a
// two-level logarithmic adder tree, y = (a0*b0 + a1*b1) + (a2*b2 + a3*b3).
// This is the building block of the PLF pipeline: one array per state of a
// matrix-vector product, N = 4 multipliers for the DNA alphabet.
// Timing: fully pipelined, one new operand set per enabled cycle, result
// LATENCY = 6 enabled cycles later (2 multiply + 2 x 2 add). en stalls all
// stages together. Multiplier arrays with logarithmic adder trees follow the
// architecture; the unit latencies are this design's.
module fp64_dot4
  import plf_pkg::*;
(
  input  logic        clk,
  input  logic        en,
  input  f64_t [3:0]  a,
  input  f64_t [3:0]  b,
  output f64_t        y
);

  localparam int LATENCY = 6;

  f64_t [3:0] p;
  f64_t [1:0] s;

  for (genvar i = 0; i < 4; i++) begin : g_mul
    fp64_mul u_mul (.clk, .en, .a(a[i]), .b(b[i]), .y(p[i]));
  end

  fp64_add u_add0 (.clk, .en, .a(p[0]), .b(p[1]), .y(s[0]));
  fp64_add u_add1 (.clk, .en, .a(p[2]), .b(p[3]), .y(s[1]));
  fp64_add u_add2 (.clk, .en, .a(s[0]), .b(s[1]), .y(y));

endmodule
