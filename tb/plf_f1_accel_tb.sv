// plf_f1_accel_tb: the F1 accelerator alone. Four behavioural memory
// channels with random ready and fixed read latency hold random child
// vectors, matrices, eigenvector and weights; two invocations of different
// sizes run back to back. Every parent word written to memory is compared
// bit for bit with a real-arithmetic reference, and the scaling counter with
// the summed weights of the scaled sites. Memory stalls, contention on the
// shared channel, execution-unit backpressure, scaling, join waits and
// re-invocation must each occur.
module plf_f1_accel_tb;
  import tb_pkg::*;
  import plf_pkg::*;

  localparam int NS_A = 30, NS_B = 9;
  localparam logic [63:0] A_LV = 64'h1000_0000, A_RV = 64'h2000_0000, A_PV = 64'h3000_0000;
  localparam logic [63:0] A_LM = 64'h0, A_RM = 64'h1000, A_EV = 64'h2000, A_WG = 64'h4000;

  logic clk = 0;
  always #2 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- DUT ----------------
  logic f1_start, f1_busy, f1_done_pulse;
  logic [31:0] f1_n_sites, f1_scale_count;
  logic c0_rq_valid, c0_rq_ready, c0_rs_valid, c1_rq_valid, c1_rq_ready, c1_rs_valid;
  logic c2_wr_valid, c2_wr_ready, c3_rq_valid, c3_rq_ready, c3_rs_valid;
  logic [63:0] c0_rq_addr, c1_rq_addr, c2_wr_addr, c3_rq_addr, c3_rs_data;
  logic [511:0] c0_rs_data, c1_rs_data, c2_wr_data;

  plf_f1_accel dut (
    .clk, .rst_n, .start(f1_start), .n_sites(f1_n_sites),
    .addr_lvec(A_LV), .addr_rvec(A_RV), .addr_pvec(A_PV),
    .addr_lmat(A_LM), .addr_rmat(A_RM), .addr_ev(A_EV), .addr_wgt(A_WG),
    .busy(f1_busy), .done_pulse(f1_done_pulse), .scale_count(f1_scale_count),
    .c0_rq_valid, .c0_rq_ready, .c0_rq_addr, .c0_rs_valid, .c0_rs_data,
    .c1_rq_valid, .c1_rq_ready, .c1_rq_addr, .c1_rs_valid, .c1_rs_data,
    .c2_wr_valid, .c2_wr_ready, .c2_wr_addr, .c2_wr_data,
    .c3_rq_valid, .c3_rq_ready, .c3_rq_addr, .c3_rs_valid, .c3_rs_data);

  // ---------------- F1 memory channels ----------------
  logic [511:0] nc512;
  logic [63:0]  nc64;
  logic         nc_rdy0, nc_rdy1, nc_rdy3, nc_v2, nc_r2;
  mem_model #(.DATA_W(512), .LAT(10)) u_m0 (.clk, .rq_valid(c0_rq_valid), .rq_ready(c0_rq_ready),
    .rq_addr(c0_rq_addr), .rs_valid(c0_rs_valid), .rs_data(c0_rs_data),
    .wr_valid(1'b0), .wr_ready(nc_rdy0), .wr_addr(64'd0), .wr_data(512'd0));
  mem_model #(.DATA_W(512), .LAT(12)) u_m1 (.clk, .rq_valid(c1_rq_valid), .rq_ready(c1_rq_ready),
    .rq_addr(c1_rq_addr), .rs_valid(c1_rs_valid), .rs_data(c1_rs_data),
    .wr_valid(1'b0), .wr_ready(nc_rdy1), .wr_addr(64'd0), .wr_data(512'd0));
  mem_model #(.DATA_W(512), .LAT(4), .READY_PCT(35)) u_m2 (.clk, .rq_valid(1'b0), .rq_ready(nc_r2),
    .rq_addr(64'd0), .rs_valid(nc_v2), .rs_data(nc512),
    .wr_valid(c2_wr_valid), .wr_ready(c2_wr_ready), .wr_addr(c2_wr_addr), .wr_data(c2_wr_data));
  mem_model #(.DATA_W(64), .LAT(6)) u_m3 (.clk, .rq_valid(c3_rq_valid), .rq_ready(c3_rq_ready),
    .rq_addr(c3_rq_addr), .rs_valid(c3_rs_valid), .rs_data(c3_rs_data),
    .wr_valid(1'b0), .wr_ready(nc_rdy3), .wr_addr(64'd0), .wr_data(64'd0));

  // ---------------- mechanism counters ----------------
  int n_contention = 0, n_ex_backpressure = 0, n_scaled = 0, n_join_wait = 0, n_invocations = 0;
  always @(posedge clk) if (rst_n) begin
    if ($countones(dut.a_rq_valid) > 1) n_contention++;
    if (dut.p_valid && !dut.p_ready) n_ex_backpressure++;
    if (dut.l_valid != dut.r_valid) n_join_wait++;
  end

  // ---------------- F1 invocation ----------------
  task automatic run_f1(input int ns);
    logic [63:0][63:0] pl, pr;
    logic [15:0][63:0] ev, vl, vr, site;
    logic [31:0] exp_scale;
    logic [15:0][63:0] expv [];
    int t0;
    expv = new[ns];
    for (int i = 0; i < 64; i++) begin
      pl[i] = rand_f64(-5, -1, 0); pr[i] = rand_f64(-5, -1, 0);
      u_m3.store[A_LM + 64'(8 * i)] = pl[i];
      u_m3.store[A_RM + 64'(8 * i)] = pr[i];
    end
    for (int i = 0; i < 16; i++) begin ev[i] = rand_f64(-2, 1, 1); u_m3.store[A_EV + 64'(8 * i)] = ev[i]; end
    exp_scale = 0;
    for (int s = 0; s < ns; s++) begin
      logic [31:0] w;
      bit tiny;
      tiny = ($urandom_range(3) == 0);
      vl = rand_site(tiny); vr = rand_site(tiny);
      w = 32'($urandom_range(1, 20));
      u_m3.store[A_WG + 64'(8 * s)] = {32'hdead_beef, w};
      u_m0.store[A_LV + 64'(128 * s)]      = vl[7:0];
      u_m0.store[A_LV + 64'(128 * s + 64)] = vl[15:8];
      u_m1.store[A_RV + 64'(128 * s)]      = vr[7:0];
      u_m1.store[A_RV + 64'(128 * s + 64)] = vr[15:8];
      if (rsite(vl, vr, pl, pr, ev, site)) begin exp_scale += w; n_scaled++; end
      expv[s] = site;
    end
    @(posedge clk);
    f1_n_sites <= ns;
    f1_start <= 1;
    @(posedge clk);
    f1_start <= 0;
    t0 = 0;
    while (!f1_done_pulse) begin @(posedge clk); t0++; end
    n_invocations++;
    $display("F1 invocation of %0d sites took %0d cycles", ns, t0);
    for (int s = 0; s < ns; s++) begin
      logic [15:0][63:0] got;
      got[7:0]  = u_m2.store[A_PV + 64'(128 * s)];
      got[15:8] = u_m2.store[A_PV + 64'(128 * s + 64)];
      for (int i = 0; i < 16; i++)
        check(got[i] === expv[s][i], $sformatf("F1 site %0d entry %0d: %h vs %h", s, i, got[i], expv[s][i]));
    end
    check(f1_scale_count === exp_scale, $sformatf("F1 scale count %0d vs %0d", f1_scale_count, exp_scale));
    check(u_m2.writes == 0 || !f1_busy, "F1 busy after done");
  endtask

  // ---------------- sequence ----------------
  initial begin
    rst_n = 0; f1_start = 0; f1_n_sites = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    run_f1(NS_A);
    run_f1(NS_B);
    check(u_m0.rq_stalls > 0, "memory channel stalls occurred");
    check(n_contention > 0, "shared channel contention occurred");
    check(n_ex_backpressure > 0, "execution unit backpressure occurred");
    check(n_scaled > 0, "site scaling occurred");
    check(n_join_wait > 0, "stream join waits occurred");
    check(n_invocations == 2, "two F1 invocations");
    $display("mechanisms: mem stalls %0d, contention %0d, EX backpressure %0d, scaled sites %0d, join waits %0d, invocations %0d",
             u_m0.rq_stalls, n_contention, n_ex_backpressure, n_scaled, n_join_wait, n_invocations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
