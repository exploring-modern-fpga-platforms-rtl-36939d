// au_regfile_rd_tb: the prefetch access unit loads a 16-word register file
// from a behavioural memory channel with random ready; every register and
// done are checked, twice with different bases.
module au_regfile_rd_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, done, rq_valid, rq_ready, rs_valid;
  logic [63:0] base_addr, rq_addr, rs_data;
  logic [15:0][63:0] regs;
  logic nc_w;
  int checks = 0, failures = 0;

  au_regfile_rd #(.NWORDS(16)) dut (.clk, .rst_n, .start, .base_addr, .done,
    .rq_valid, .rq_ready, .rq_addr, .rs_valid, .rs_data, .regs);
  mem_model #(.DATA_W(64), .LAT(5), .READY_PCT(60)) u_mem (.clk, .rq_valid, .rq_ready, .rq_addr,
    .rs_valid, .rs_data, .wr_valid(1'b0), .wr_ready(nc_w), .wr_addr(64'd0), .wr_data(64'd0));

  task automatic run(input logic [63:0] base);
    for (int i = 0; i < 16; i++) u_mem.store[base + 64'(8 * i)] = {$urandom, $urandom};
    @(posedge clk);
    base_addr <= base; start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    checks++;
    if (done) failures++;
    wait (done);
    @(posedge clk);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (regs[i] !== u_mem.store[base + 64'(8 * i)]) failures++;
    end
  endtask

  initial begin
    rst_n = 0; start = 0; base_addr = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(64'h2000);
    run(64'h7_0040);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
