// mem_arbiter_tb: four requesters issue reads at random to disjoint address
// ranges through the arbiter onto one behavioural memory channel. Each
// requester must receive exactly its own words in its own request order, all
// requesters must be served, and simultaneous requests (contention) must
// occur. Grants must rotate: no requester waits more than NREQ grants.
module mem_arbiter_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [3:0] rq_valid, rq_ready, rs_valid;
  logic [3:0][63:0] rq_addr;
  logic [63:0] rs_data, m_rq_addr, m_rs_data;
  logic m_rq_valid, m_rq_ready, m_rs_valid, nc_w;
  int checks = 0, failures = 0, contention = 0;
  int sent [4], recv [4], wait_grants [4];
  localparam int PER = 60;

  mem_arbiter #(.NREQ(4), .DATA_W(64), .MAX_OUT(8)) dut (.clk, .rst_n, .rq_valid, .rq_ready, .rq_addr,
    .rs_valid, .rs_data, .m_rq_valid, .m_rq_ready, .m_rq_addr, .m_rs_valid, .m_rs_data);
  mem_model #(.DATA_W(64), .LAT(7), .READY_PCT(70)) u_mem (.clk, .rq_valid(m_rq_valid), .rq_ready(m_rq_ready),
    .rq_addr(m_rq_addr), .rs_valid(m_rs_valid), .rs_data(m_rs_data),
    .wr_valid(1'b0), .wr_ready(nc_w), .wr_addr(64'd0), .wr_data(64'd0));

  initial begin
    for (int r = 0; r < 4; r++)
      for (int i = 0; i < PER; i++) u_mem.store[64'(r) * 64'h10000 + 64'(8 * i)] = {32'(r), 32'(i)};
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      rq_valid <= '0;
      for (int r = 0; r < 4; r++) begin sent[r] = 0; recv[r] = 0; wait_grants[r] = 0; end
    end else begin
      if ($countones(rq_valid) > 1) contention++;
      for (int r = 0; r < 4; r++) begin
        if (rs_valid[r]) begin
          checks++;
          if (rs_data !== {32'(r), 32'(recv[r])}) failures++;
          recv[r]++;
        end
        if (rq_valid[r] && rq_ready[r]) begin sent[r]++; wait_grants[r] = 0; end
        else if (rq_valid[r] && |rq_ready) begin
          wait_grants[r]++;
          if (wait_grants[r] >= 4) begin failures++; $display("requester %0d starved", r); end
        end
        if (!(rq_valid[r] && !rq_ready[r])) begin
          rq_valid[r] <= (sent[r] + ((rq_valid[r] && rq_ready[r]) ? 1 : 0) < PER) && ($urandom_range(99) < 60);
          rq_addr[r]  <= 64'(r) * 64'h10000 + 64'(8 * (sent[r]));
        end
      end
    end
  end

  initial begin
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    wait (recv[0] == PER && recv[1] == PER && recv[2] == PER && recv[3] == PER);
    repeat (10) @(posedge clk);
    checks++;
    if (contention == 0 || (|rs_valid)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
