// sync_fifo_tb: random push/pop traffic against a queue model; checks order,
// data, the count output, full (in_ready low at DEPTH entries) and empty.
module sync_fifo_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  logic [3:0] count;
  int checks = 0, failures = 0, fulls = 0, empties = 0;
  logic [15:0] q [$];

  sync_fifo #(.WIDTH(16), .DEPTH(8)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .count);

  initial begin
    rst_n = 0; in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 3000; c++) begin
      in_valid  <= ($urandom_range(99) < ((c / 500) % 2 ? 30 : 70));
      in_data   <= 16'($urandom);
      out_ready <= ($urandom_range(99) < ((c / 500) % 2 ? 70 : 30));
      @(posedge clk);
      checks++;
      if (count !== 4'(q.size()) || in_ready !== (q.size() < 8) || out_valid !== (q.size() > 0)) failures++;
      if (q.size() == 8) fulls++;
      if (q.size() == 0) empties++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== q.pop_front()) failures++;
      end
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++;
    if (fulls == 0 || empties == 0) failures++;
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
