// au_stream_rd_tb: the read access unit fetches n_words consecutive words
// through a behavioural memory channel (random ready, 9-cycle latency) while
// the consumer takes words with random ready. Checks the stream data and
// order, the request addresses, that the FIFO never overflows (the unit's own
// assertion), that the credit limit throttled requests at least once, and
// done. Two runs with different bases and lengths.
module au_stream_rd_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, done, rq_valid, rq_ready, rs_valid, o_valid, o_ready;
  logic [63:0] base_addr, rq_addr;
  logic [31:0] n_words;
  logic [127:0] rs_data, o_data;
  logic nc_w;
  int checks = 0, failures = 0, got = 0, throttled = 0;

  au_stream_rd #(.DATA_W(128), .FIFO_DEPTH(8)) dut (.clk, .rst_n, .start, .base_addr, .n_words, .done,
    .rq_valid, .rq_ready, .rq_addr, .rs_valid, .rs_data, .o_valid, .o_ready, .o_data);
  mem_model #(.DATA_W(128), .LAT(9), .READY_PCT(85)) u_mem (.clk, .rq_valid, .rq_ready, .rq_addr,
    .rs_valid, .rs_data, .wr_valid(1'b0), .wr_ready(nc_w), .wr_addr(64'd0), .wr_data(128'd0));

  always @(posedge clk) if (dut.active && !rq_valid && dut.issued != n_words) throttled++;

  task automatic run(input logic [63:0] base, input int n);
    for (int i = 0; i < n; i++) u_mem.store[base + 64'(16 * i)] = {64'(i), base};
    @(posedge clk);
    base_addr <= base; n_words <= 32'(n); start <= 1;
    @(posedge clk);
    start <= 0;
    got = 0;
    while (got < n) begin
      o_ready <= ($urandom_range(99) < 40);
      @(posedge clk);
      if (o_valid && o_ready) begin
        checks++;
        if (o_data !== {64'(got), base}) failures++;
        got++;
      end
    end
    o_ready <= 0;
    repeat (12) @(posedge clk);
    checks++;
    if (!done || o_valid) failures++;
  endtask

  initial begin
    rst_n = 0; start = 0; o_ready = 0; base_addr = 0; n_words = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(64'h1000, 100);
    run(64'h8_0000, 37);
    checks++;
    if (throttled == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
