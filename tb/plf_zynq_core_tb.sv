// plf_zynq_core_tb: two separate instances of the ZCU102 PLF core, each
// loaded through its register port with its own matrices and streaming its
// own random sites. Instance 0 streams without gaps and must deliver one
// parent site per 8 cycles; instance 1 sees random gaps on both child streams
// and random parent backpressure. Parent data (bit for bit against a
// real-arithmetic reference), TLAST, register read-back, the scaled-site
// counter and busy are checked.
module plf_zynq_core_tb;
  import tb_pkg::*;
  import plf_pkg::*;

  localparam int NSZ = 24;

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

  logic [1:0]          z_reg_we, z_l_tvalid, z_l_tready, z_r_tvalid, z_r_tready;
  logic [1:0]          z_p_tvalid, z_p_tready, z_p_tlast, z_busy;
  logic [1:0][7:0]     z_reg_addr;
  logic [1:0][63:0]    z_reg_wdata, z_reg_rdata;
  logic [1:0][127:0]   z_l_tdata, z_r_tdata, z_p_tdata;

  for (genvar d = 0; d < 2; d++) begin : g_dut
    plf_zynq_core dut (.clk, .rst_n, .reg_we(z_reg_we[d]), .reg_addr(z_reg_addr[d]),
      .reg_wdata(z_reg_wdata[d]), .reg_rdata(z_reg_rdata[d]),
      .l_tvalid(z_l_tvalid[d]), .l_tready(z_l_tready[d]), .l_tdata(z_l_tdata[d]),
      .r_tvalid(z_r_tvalid[d]), .r_tready(z_r_tready[d]), .r_tdata(z_r_tdata[d]),
      .p_tvalid(z_p_tvalid[d]), .p_tready(z_p_tready[d]), .p_tdata(z_p_tdata[d]),
      .p_tlast(z_p_tlast[d]), .busy(z_busy[d]));
  end

  int n_scaled = 0, n_join_wait = 0;

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

  initial begin
    rst_n = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    wait (zdone == 2);
    check(n_scaled > 0, "site scaling occurred");
    check(n_join_wait > 0, "stream join waits occurred");
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
