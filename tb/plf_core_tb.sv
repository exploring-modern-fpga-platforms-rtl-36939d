// plf_core_tb: end-to-end check of the PLF execution unit in both stream
// widths used by the design, LANES = 8 (512-bit) and LANES = 2 (128-bit),
// side by side on the same data. Child vectors, transition matrices and
// eigenvectors are random; about a quarter of the sites are made tiny so that
// their parent entries fall below 2^-256 and must be scaled. Expected parent
// entries are computed with real arithmetic in the hardware's operation order
// and scaled in the testbench by the RAxML rule, then compared bit for bit.
// Pass 0 inserts random gaps on both child streams, the weight stream and the
// parent ready; pass 1 streams without gaps and checks that the parent stream
// runs at one beat per cycle, i.e. one site every 16/LANES cycles.
// The scaling counter must equal the summed weights of the scaled sites.
module plf_core_tb;
  import tb_pkg::*;
  import plf_pkg::*;

  localparam int NS = 48;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  f64_t [MAT_DBL-1:0] pl, pr;
  f64_t [EV_DBL-1:0]  ev;
  f64_t vl [NS][SITE_DBL];
  f64_t vr [NS][SITE_DBL];
  f64_t ex [NS][SITE_DBL];
  logic [31:0] wt [NS];
  logic [31:0] exp_scale;
  int checks = 0, failures = 0;
  int n_done = 0;
  int n_scaled = 0;

  initial begin
    logic [3:0][63:0] a, b, y;
    logic [15:0][63:0] ml, mr, e16;
    bit tiny, all_small;
    for (int i = 0; i < MAT_DBL; i++) begin
      pl[i] = rand_f64(-5, -1, 0);
      pr[i] = rand_f64(-5, -1, 0);
    end
    for (int i = 0; i < EV_DBL; i++) ev[i] = rand_f64(-2, 1, 1);
    exp_scale = 0;
    for (int s = 0; s < NS; s++) begin
      tiny = ($urandom_range(3) == 0);
      wt[s] = 32'($urandom_range(1, 9));
      for (int i = 0; i < SITE_DBL; i++) begin
        vl[s][i] = tiny ? rand_f64(-210, -200, 0) : rand_f64(-12, 0, 0);
        vr[s][i] = tiny ? rand_f64(-210, -200, 0) : rand_f64(-12, 0, 0);
      end
      for (int k = 0; k < NRATES; k++) begin
        for (int i = 0; i < 4; i++) begin a[i] = vl[s][k*4+i]; b[i] = vr[s][k*4+i]; end
        for (int i = 0; i < 16; i++) begin ml[i] = pl[k*16+i]; mr[i] = pr[k*16+i]; e16[i] = ev[i]; end
        y = rrcu(a, b, ml, mr, e16);
        for (int i = 0; i < 4; i++) ex[s][k*4+i] = y[i];
      end
      all_small = 1;
      for (int i = 0; i < SITE_DBL; i++)
        if ($bitstoreal(ex[s][i]) >= 2.0 ** (-256) || $bitstoreal(ex[s][i]) <= -(2.0 ** (-256))) all_small = 0;
      if (all_small) begin
        n_scaled++;
        exp_scale += wt[s];
        for (int i = 0; i < SITE_DBL; i++) ex[s][i] = $realtobits($bitstoreal(ex[s][i]) * (2.0 ** 256));
      end
    end
    exp_scale = exp_scale * 2;
  end

  initial begin
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
  end

  for (genvar g = 0; g < 2; g++) begin : g_dut
    localparam int LN    = (g == 0) ? 8 : 2;
    localparam int BEATS = SITE_DBL / LN;
    localparam int TOT   = NS * BEATS;

    logic l_valid, l_ready, r_valid, r_ready, w_valid, w_ready, p_valid, p_ready, busy;
    f64_t [LN-1:0] l_data, r_data, p_data;
    logic [31:0] w_data, scale_count;
    int li, ri, wi, oi;
    int first_cyc, last_cyc, cyc;
    int bp_seen, join_wait_seen;

    plf_core #(.LANES(LN)) dut (
      .clk, .rst_n, .clear(1'b0), .pl, .pr, .ev,
      .l_valid, .l_ready, .l_data, .r_valid, .r_ready, .r_data,
      .w_valid, .w_ready, .w_data, .p_valid, .p_ready, .p_data,
      .scale_count, .busy);

    function automatic bit may_send(int idx, int outs);
      if (idx >= 2 * TOT) return 0;
      if (idx < TOT) return ($urandom_range(2) != 0);
      return outs >= TOT;            // pass 1 starts after pass 0 drained
    endfunction

    always @(posedge clk) begin
      if (!rst_n) begin
        li = 0; ri = 0; wi = 0; oi = 0; cyc = 0; bp_seen = 0; join_wait_seen = 0;
        l_valid <= 0; r_valid <= 0; w_valid <= 0; p_ready <= 0;
      end else begin
        cyc++;
        if (l_valid && !l_ready) join_wait_seen++;
        if (p_valid && !p_ready) bp_seen++;
        if (l_valid && l_ready) li++;
        if (r_valid && r_ready) ri++;
        if (w_valid && w_ready) wi++;
        if (p_valid && p_ready) begin
          for (int i = 0; i < LN; i++) begin
            checks++;
            if (p_data[i] !== ex[(oi / BEATS) % NS][(oi % BEATS) * LN + i]) begin
              failures++;
              if (failures < 8) $display("LANES=%0d beat %0d lane %0d: got %h expected %h", LN, oi, i,
                                         p_data[i], ex[(oi / BEATS) % NS][(oi % BEATS) * LN + i]);
            end
          end
          if (oi == TOT) first_cyc = cyc;
          if (oi == 2 * TOT - 1) last_cyc = cyc;
          oi++;
        end
        if (!(l_valid && !l_ready)) begin
          l_valid <= may_send(li, oi);
          for (int i = 0; i < LN; i++) l_data[i] <= vl[(li / BEATS) % NS][(li % BEATS) * LN + i];
        end
        if (!(r_valid && !r_ready)) begin
          r_valid <= may_send(ri, oi);
          for (int i = 0; i < LN; i++) r_data[i] <= vr[(ri / BEATS) % NS][(ri % BEATS) * LN + i];
        end
        if (!(w_valid && !w_ready)) begin
          w_valid <= (wi < 2 * NS) && (wi < NS ? ($urandom_range(1) != 0) : (oi >= TOT));
          w_data  <= wt[wi % NS];
        end
        p_ready <= (oi < TOT) ? ($urandom_range(3) != 0) : 1'b1;
      end
    end

    initial begin
      wait (rst_n && oi == 2 * TOT);
      repeat (3) @(posedge clk);
      checks++;
      if (last_cyc - first_cyc != TOT - 1) begin
        failures++;
        $display("LANES=%0d: pass 1 took %0d cycles for %0d beats", LN, last_cyc - first_cyc + 1, TOT);
      end
      checks++;
      if (scale_count !== exp_scale) begin
        failures++;
        $display("LANES=%0d: scale_count %0d expected %0d", LN, scale_count, exp_scale);
      end
      checks++;
      if (busy) begin failures++; $display("LANES=%0d: busy after drain", LN); end
      checks++;
      if (bp_seen == 0 || join_wait_seen == 0) begin
        failures++;
        $display("LANES=%0d: backpressure %0d join waits %0d", LN, bp_seen, join_wait_seen);
      end
      n_done++;
    end
  end

  initial begin
    wait (n_done == 2);
    checks++;
    if (n_scaled == 0 || n_scaled == NS) begin failures++; $display("scaling not exercised"); end
    $display("scaled sites per pass: %0d of %0d", n_scaled, NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
