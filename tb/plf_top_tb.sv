// plf_top_tb: end-to-end test of both accelerator systems at the default
// parameters.
// F1 side: four behavioural memory channels with random ready and a fixed
// read latency hold random child vectors, matrices, eigenvector and weights.
// Two invocations are run back to back (different sizes and matrices); after
// each, every parent word in memory is compared bit for bit with a reference
// computed in real arithmetic, and the scaling counter with the summed
// weights of the scaled sites.
// ZCU102 side: each of the two cores is loaded through its register port and
// streams its own sites, core 0 without gaps (one site per 8 cycles is
// checked), core 1 with random gaps and backpressure; the parent streams,
// TLAST and the scaled-site counter read back over the register port are
// checked.
// Mechanisms that must occur at least once: memory-channel stalls, contention
// on the shared 64-bit channel, execution-unit backpressure, site scaling,
// stream join waits and re-invocation.
module plf_top_tb;
  import tb_pkg::*;
  import plf_pkg::*;

  localparam int NS_A = 40, NS_B = 12, NSZ = 24;
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

  logic [1:0]          z_reg_we, z_l_tvalid, z_l_tready, z_r_tvalid, z_r_tready;
  logic [1:0]          z_p_tvalid, z_p_tready, z_p_tlast, z_busy;
  logic [1:0][7:0]     z_reg_addr;
  logic [1:0][63:0]    z_reg_wdata, z_reg_rdata;
  logic [1:0][127:0]   z_l_tdata, z_r_tdata, z_p_tdata;

  plf_top dut (
    .f1_clk(clk), .f1_rst_n(rst_n), .f1_start, .f1_n_sites,
    .f1_addr_lvec(A_LV), .f1_addr_rvec(A_RV), .f1_addr_pvec(A_PV),
    .f1_addr_lmat(A_LM), .f1_addr_rmat(A_RM), .f1_addr_ev(A_EV), .f1_addr_wgt(A_WG),
    .f1_busy, .f1_done_pulse, .f1_scale_count,
    .f1_c0_rq_valid(c0_rq_valid), .f1_c0_rq_ready(c0_rq_ready), .f1_c0_rq_addr(c0_rq_addr),
    .f1_c0_rs_valid(c0_rs_valid), .f1_c0_rs_data(c0_rs_data),
    .f1_c1_rq_valid(c1_rq_valid), .f1_c1_rq_ready(c1_rq_ready), .f1_c1_rq_addr(c1_rq_addr),
    .f1_c1_rs_valid(c1_rs_valid), .f1_c1_rs_data(c1_rs_data),
    .f1_c2_wr_valid(c2_wr_valid), .f1_c2_wr_ready(c2_wr_ready), .f1_c2_wr_addr(c2_wr_addr),
    .f1_c2_wr_data(c2_wr_data),
    .f1_c3_rq_valid(c3_rq_valid), .f1_c3_rq_ready(c3_rq_ready), .f1_c3_rq_addr(c3_rq_addr),
    .f1_c3_rs_valid(c3_rs_valid), .f1_c3_rs_data(c3_rs_data),
    .z_clk(clk), .z_rst_n(rst_n), .z_reg_we, .z_reg_addr, .z_reg_wdata, .z_reg_rdata,
    .z_l_tvalid, .z_l_tready, .z_l_tdata, .z_r_tvalid, .z_r_tready, .z_r_tdata,
    .z_p_tvalid, .z_p_tready, .z_p_tdata, .z_p_tlast, .z_busy);

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
    if ($countones(dut.u_f1.a_rq_valid) > 1) n_contention++;
    if (dut.u_f1.p_valid && !dut.u_f1.p_ready) n_ex_backpressure++;
    if (dut.u_f1.l_valid != dut.u_f1.r_valid) n_join_wait++;
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

  // ---------------- ZCU102 cores ----------------
  logic [15:0][63:0] zl [2][NSZ];
  logic [15:0][63:0] zr [2][NSZ];
  logic [15:0][63:0] zx [2][NSZ];
  int zscaled [2];
  int zdone = 0;

  for (genvar c = 0; c < 2; c++) begin : g_z
    int li, ri, oi, first_cyc, last_cyc, cyc;
    bit go;
    initial go = 0;

    always @(posedge clk) begin
      if (!rst_n || !go) begin
        li = 0; ri = 0; oi = 0; cyc = 0;
        z_l_tvalid[c] <= 0; z_r_tvalid[c] <= 0; z_p_tready[c] <= 0;
      end else begin
        cyc++;
        if (z_l_tvalid[c] && !z_l_tready[c] && z_r_tvalid[c] != z_l_tvalid[c]) n_join_wait++;
        if (z_l_tvalid[c] && z_l_tready[c]) li++;
        if (z_r_tvalid[c] && z_r_tready[c]) ri++;
        if (z_p_tvalid[c] && z_p_tready[c]) begin
          check(z_p_tdata[c][63:0] === zx[c][oi / 8][(oi % 8) * 2] &&
                z_p_tdata[c][127:64] === zx[c][oi / 8][(oi % 8) * 2 + 1],
                $sformatf("Z core %0d beat %0d", c, oi));
          check(z_p_tlast[c] == (oi == NSZ * 8 - 1), $sformatf("Z core %0d tlast at beat %0d", c, oi));
          if (oi == 0) first_cyc = cyc;
          last_cyc = cyc;
          oi++;
        end
        if (!(z_l_tvalid[c] && !z_l_tready[c])) begin
          z_l_tvalid[c] <= (li < NSZ * 8) && (c == 0 || $urandom_range(2) != 0);
          z_l_tdata[c]  <= {zl[c][(li / 8) % NSZ][(li % 8) * 2 + 1], zl[c][(li / 8) % NSZ][(li % 8) * 2]};
        end
        if (!(z_r_tvalid[c] && !z_r_tready[c])) begin
          z_r_tvalid[c] <= (ri < NSZ * 8) && (c == 0 || $urandom_range(2) != 0);
          z_r_tdata[c]  <= {zr[c][(ri / 8) % NSZ][(ri % 8) * 2 + 1], zr[c][(ri / 8) % NSZ][(ri % 8) * 2]};
        end
        z_p_tready[c] <= (c == 0) || ($urandom_range(3) != 0);
      end
    end

    initial begin
      logic [63:0][63:0] pl, pr;
      logic [15:0][63:0] ev;
      z_reg_we[c] = 0; z_reg_addr[c] = 0; z_reg_wdata[c] = 0;
      zscaled[c] = 0;
      for (int i = 0; i < 64; i++) begin pl[i] = rand_f64(-5, -1, 0); pr[i] = rand_f64(-5, -1, 0); end
      for (int i = 0; i < 16; i++) ev[i] = rand_f64(-2, 1, 1);
      for (int s = 0; s < NSZ; s++) begin
        bit tiny;
        tiny = ($urandom_range(3) == 0);
        zl[c][s] = rand_site(tiny); zr[c][s] = rand_site(tiny);
        if (rsite(zl[c][s], zr[c][s], pl, pr, ev, zx[c][s])) zscaled[c]++;
      end
      wait (rst_n);
      for (int i = 0; i < 146; i++) begin
        @(posedge clk);
        z_reg_we[c]    <= 1;
        z_reg_addr[c]  <= 8'(i);
        z_reg_wdata[c] <= (i < 64) ? pl[i] : (i < 128) ? pr[i - 64] : (i < 144) ? ev[i - 128] : (i == 144) ? 64'(NSZ) : 64'd0;
      end
      @(posedge clk);
      z_reg_we[c] <= 0;
      z_reg_addr[c] <= 8'd77;
      @(posedge clk);
      #1 check(z_reg_rdata[c] === pr[13], $sformatf("Z core %0d register read-back", c));
      go = 1;
      wait (oi == NSZ * 8);
      repeat (4) @(posedge clk);
      z_reg_addr[c] <= 8'd145;
      @(posedge clk);
      #1 check(z_reg_rdata[c] === 64'(zscaled[c]), $sformatf("Z core %0d scaled sites %0d vs %0d", c, z_reg_rdata[c], zscaled[c]));
      if (c == 0)
        check(last_cyc - first_cyc == NSZ * 8 - 1,
              $sformatf("Z core 0: %0d parent beats over %0d cycles", NSZ * 8, last_cyc - first_cyc + 1));
      check(z_busy[c] == 0, $sformatf("Z core %0d busy after drain", c));
      n_scaled += zscaled[c];
      zdone++;
    end
  end

  // ---------------- sequence ----------------
  initial begin
    rst_n = 0; f1_start = 0; f1_n_sites = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    run_f1(NS_A);
    run_f1(NS_B);
    wait (zdone == 2);
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
