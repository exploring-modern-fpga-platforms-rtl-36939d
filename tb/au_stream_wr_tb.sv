// au_stream_wr_tb: the write access unit takes a stream with random gaps and
// writes it through a behavioural memory channel with random ready (FIFO
// fills and backpressures the stream). Memory contents, addresses and done
// are checked.
module au_stream_wr_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, done, i_valid, i_ready, wr_valid, wr_ready;
  logic [63:0] base_addr, wr_addr;
  logic [31:0] n_words;
  logic [127:0] i_data, wr_data, nc_d;
  logic nc_r, nc_v;
  int checks = 0, failures = 0, sent = 0, bp = 0;
  localparam int N = 90;

  au_stream_wr #(.DATA_W(128), .FIFO_DEPTH(8)) dut (.clk, .rst_n, .start, .base_addr, .n_words, .done,
    .i_valid, .i_ready, .i_data, .wr_valid, .wr_ready, .wr_addr, .wr_data);
  mem_model #(.DATA_W(128), .LAT(2), .READY_PCT(30)) u_mem (.clk, .rq_valid(1'b0), .rq_ready(nc_r),
    .rq_addr(64'd0), .rs_valid(nc_v), .rs_data(nc_d), .wr_valid, .wr_ready, .wr_addr, .wr_data);

  initial begin
    rst_n = 0; start = 0; i_valid = 0; i_data = 0; base_addr = 0; n_words = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    base_addr <= 64'h4000; n_words <= N; start <= 1;
    @(posedge clk);
    start <= 0;
    while (sent < N) begin
      if (!(i_valid && !i_ready)) begin
        i_valid <= ($urandom_range(99) < 80);
        i_data  <= {32'(sent), 96'hfeed};
      end
      @(posedge clk);
      if (i_valid && !i_ready) bp++;
      if (i_valid && i_ready) sent++;
    end
    i_valid <= 0;
    wait (done);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (u_mem.store[64'h4000 + 64'(16 * i)] !== {32'(i), 96'hfeed}) failures++;
    end
    checks++;
    if (u_mem.writes != N || bp == 0) failures++;
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
