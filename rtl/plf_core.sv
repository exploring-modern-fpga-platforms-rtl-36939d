// plf_core: the PLF execution unit. It consumes the ancestral probability
// vectors of a left and a right child node as two streams of LANES doubles per
// beat, and produces the parent vector as a stream of the same width.
// A site is 16 doubles (4 Gamma rate categories x 4 states, rate-major), so a
// site takes 16/LANES beats on each stream and the unit produces one parent
// site every 16/LANES cycles when the streams do not stall.
//
// How it works:
//  * Join/gather: a beat is taken when both child streams are valid (and, on
//    the first beat of a site, the site weight is valid). Beats are gathered
//    into a "step" of RCS = max(1, LANES/4) whole rate categories.
//  * RCS rate-category units (plf_rcu) evaluate Eq. 2 and the eigenvector
//    product for the step; the rate category selects the left/right matrix
//    pair from the register-file inputs.
//  * Assembly: finished steps are written into a site buffer. When a site is
//    complete it is passed through plf_site_scale into the output buffer and,
//    if it was scaled, its weight is added to scale_count.
//  * The output buffer emits the site in 16/LANES beats.
//  Flow control is a global pipeline enable: the arithmetic pipeline stops
//  when its output holds a step that the full site buffer cannot take.
//
// Interface: ready/valid streams l_*, r_* (children), w_* (one 32-bit weight
// per site) and p_* (parent). pl/pr/ev are the register files of the left and
// right matrices (64 doubles each, index k*16+u*4+s) and of the inverted
// eigenvector (16 doubles, index j*4+l); they must stay constant while sites
// are in flight. clear zeroes scale_count (start of an invocation); busy is
// high while any site is inside the unit.
// Timing: latency from the last beat of a site to its first output beat is
// 14 (arithmetic) + 2 cycles; throughput one beat per cycle.
// LANES = 8 is the 512-bit F1 execution unit, LANES = 2 the 128-bit ZCU102
// core. Synchronous active-low reset; the data path is not reset.
module plf_core
  import plf_pkg::*;
#(
  parameter int LANES = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  f64_t [MAT_DBL-1:0]        pl,
  input  f64_t [MAT_DBL-1:0]        pr,
  input  f64_t [EV_DBL-1:0]         ev,
  input  logic                      l_valid,
  output logic                      l_ready,
  input  f64_t [LANES-1:0]          l_data,
  input  logic                      r_valid,
  output logic                      r_ready,
  input  f64_t [LANES-1:0]          r_data,
  input  logic                      w_valid,
  output logic                      w_ready,
  input  logic [31:0]               w_data,
  output logic                      p_valid,
  input  logic                      p_ready,
  output f64_t [LANES-1:0]          p_data,
  output logic [31:0]               scale_count,
  output logic                      busy
);

  localparam int RCS     = (LANES >= 4) ? LANES / 4 : 1;   // rate categories per step
  localparam int BPS     = (LANES >= 4) ? 1 : 4 / LANES;   // beats per step
  localparam int STEPS   = NRATES / RCS;                   // steps per site
  localparam int OBEATS  = SITE_DBL / LANES;               // output beats per site
  localparam int STEP_DBL = 4 * RCS;
  localparam int LAT     = 14;                             // plf_rcu latency
  localparam int BW      = (BPS > 1) ? $clog2(BPS) : 1;
  localparam int SW      = (STEPS > 1) ? $clog2(STEPS) : 1;
  localparam int OW      = (OBEATS > 1) ? $clog2(OBEATS) : 1;

  initial assert (LANES == 1 || LANES == 2 || LANES == 4 || LANES == 8 || LANES == 16)
    else $error("plf_core: LANES must be 1, 2, 4, 8 or 16");

  logic en;

  // ---------------- join and gather ----------------
  logic [BW-1:0] bcnt;
  logic [SW-1:0] scnt;
  logic [31:0]   w_hold;
  logic          first_beat, beat_fire, step_fire;
  f64_t [STEP_DBL-1:0] gl, gr;       // gathered earlier beats of the step
  f64_t [STEP_DBL-1:0] sl, sr;       // complete step (gathered + current beat)

  assign first_beat = (bcnt == '0) && (scnt == '0);
  assign beat_fire  = en && l_valid && r_valid && (!first_beat || w_valid);
  assign l_ready    = beat_fire;
  assign r_ready    = beat_fire;
  assign w_ready    = beat_fire && first_beat;
  assign step_fire  = beat_fire && (bcnt == BW'(BPS - 1));

  always_comb begin
    sl = gl;
    sr = gr;
    for (int i = 0; i < LANES; i++) begin
      sl[(int'(bcnt) * LANES + i) % STEP_DBL] = l_data[i];
      sr[(int'(bcnt) * LANES + i) % STEP_DBL] = r_data[i];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bcnt <= '0;
      scnt <= '0;
      w_hold <= '0;
    end else if (beat_fire) begin
      if (first_beat) w_hold <= w_data;
      if (bcnt == BW'(BPS - 1)) begin
        bcnt <= '0;
        scnt <= (scnt == SW'(STEPS - 1)) ? '0 : scnt + 1'b1;
      end else begin
        bcnt <= bcnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk)
    if (beat_fire) begin
      gl <= sl;
      gr <= sr;
    end

  // ---------------- rate-category units ----------------
  f64_t [RCS-1:0][3:0] rc_out;

  for (genvar r = 0; r < RCS; r++) begin : g_rcu
    f64_t [3:0]  vl, vr;
    f64_t [15:0] mpl, mpr;
    always_comb begin
      for (int s = 0; s < 4; s++) begin
        vl[s] = sl[r * 4 + s];
        vr[s] = sr[r * 4 + s];
      end
      for (int i = 0; i < 16; i++) begin
        mpl[i] = pl[(int'(scnt) * RCS + r) * 16 + i];
        mpr[i] = pr[(int'(scnt) * RCS + r) * 16 + i];
      end
    end
    plf_rcu u_rcu (.clk, .en, .vl, .vr, .pl(mpl), .pr(mpr), .ev, .y(rc_out[r]));
  end

  // step bookkeeping travels alongside the arithmetic
  logic [LAT-1:0]           pv;
  logic [LAT-1:0][SW-1:0]   pstep;
  logic [LAT-1:0][31:0]     pw;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pv <= '0;
    end else if (en) begin
      pv <= {pv[LAT-2:0], step_fire};
    end
  end

  always_ff @(posedge clk)
    if (en) begin
      pstep <= {pstep[LAT-2:0], scnt};
      pw    <= {pw[LAT-2:0], first_beat ? w_data : w_hold};
    end

  logic          out_v;
  logic [SW-1:0] out_step;
  logic [31:0]   out_w;
  assign out_v    = pv[LAT-1];
  assign out_step = pstep[LAT-1];
  assign out_w    = pw[LAT-1];

  // ---------------- site assembly, scaling, output ----------------
  f64_t [SITE_DBL-1:0] asm_d, sc_d, ob_d;
  logic                asm_done;
  logic [31:0]         asm_w, add_w;
  logic                ob_valid;
  logic [OW-1:0]       ob_beat;
  logic                ob_last, xfer, asm_wr;

  assign ob_last = (ob_beat == OW'(OBEATS - 1));
  assign xfer    = asm_done && (!ob_valid || (p_ready && ob_last));
  assign en      = !(out_v && asm_done && !xfer);
  assign asm_wr  = out_v && en;

  plf_site_scale u_scale (.site_in(asm_d), .weight(asm_w), .site_out(sc_d),
                          .scaled(), .add_weight(add_w));

  always_ff @(posedge clk)
    if (asm_wr) begin
      for (int i = 0; i < STEP_DBL; i++)
        asm_d[int'(out_step) * STEP_DBL + i] <= rc_out[i / 4][i % 4];
      if (out_step == SW'(STEPS - 1)) asm_w <= out_w;
    end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      asm_done <= 1'b0;
    end else begin
      if (asm_wr && out_step == SW'(STEPS - 1)) asm_done <= 1'b1;
      else if (xfer)                            asm_done <= 1'b0;
    end
  end

  always_ff @(posedge clk)
    if (xfer) ob_d <= sc_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ob_valid    <= 1'b0;
      ob_beat     <= '0;
      scale_count <= '0;
    end else begin
      if (xfer) begin
        ob_valid <= 1'b1;
        ob_beat  <= '0;
      end else if (ob_valid && p_ready) begin
        if (ob_last) ob_valid <= 1'b0;
        else         ob_beat  <= ob_beat + 1'b1;
      end
      if (clear)     scale_count <= '0;
      else if (xfer) scale_count <= scale_count + add_w;
    end
  end

  assign p_valid = ob_valid;
  always_comb
    for (int i = 0; i < LANES; i++) p_data[i] = ob_d[int'(ob_beat) * LANES + i];

  assign busy = (|pv) || asm_done || ob_valid || (bcnt != '0) || (scnt != '0);

  // the parent stream must hold its beat until it is taken
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (p_valid && !p_ready) |=> (p_valid && $stable(p_data));
  endproperty
  assert property (p_hold);

endmodule
