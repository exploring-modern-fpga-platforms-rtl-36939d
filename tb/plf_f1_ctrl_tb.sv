// plf_f1_ctrl_tb: drives the invocation controller through two invocations
// with modelled access-unit done flags (stale done flags from the previous
// invocation stay high for a while, as in the real access units). Checks the
// order of start_mat, clear_scale, start_stream and done_pulse, that a start
// while busy is ignored, and busy.
module plf_f1_ctrl_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, mat_done, out_done, start_mat, start_stream, clear_scale, busy, done_pulse;
  int checks = 0, failures = 0;
  int n_mat = 0, n_stream = 0, n_done = 0, n_clear = 0;

  plf_f1_ctrl dut (.clk, .rst_n, .start, .mat_done, .out_done, .start_mat, .start_stream,
                   .clear_scale, .busy, .done_pulse);

  // access-unit model: done drops on its start, rises some cycles later
  int mat_cnt = -1, out_cnt = -1;
  always @(posedge clk) begin
    if (!rst_n) begin end
    else if (start_mat) begin mat_done <= 0; mat_cnt = 20; n_mat++; end
    else if (mat_cnt > 0) mat_cnt--;
    else if (mat_cnt == 0) begin mat_done <= 1; mat_cnt = -1; end
    if (rst_n && start_stream) begin
      out_done <= 0; out_cnt = 40; n_stream++;
      checks++;
      if (!mat_done) begin failures++; $display("stream started before matrices loaded"); end
      if (n_mat != n_stream) begin failures++; $display("stream start before matrices"); end
    end
    else if (out_cnt > 0) out_cnt--;
    else if (out_cnt == 0) begin out_done <= 1; out_cnt = -1; end
    if (rst_n && clear_scale) n_clear++;
    if (rst_n && done_pulse) begin n_done++; checks++; if (n_stream != n_done || out_done !== 1) begin failures++; $display("done_pulse out of order"); end end
  end

  initial begin
    rst_n = 0; start = 0; mat_done = 1; out_done = 1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int inv = 0; inv < 2; inv++) begin
      @(posedge clk); start <= 1;
      @(posedge clk); start <= 0;
      repeat (5) @(posedge clk);
      checks++; if (!busy) begin failures++; $display("not busy"); end
      start <= 1; @(posedge clk); start <= 0;   // ignored while busy
      wait (done_pulse);
      @(posedge clk);
      @(posedge clk);
      checks++; if (busy) begin failures++; $display("busy after done"); end
    end
    checks++;
    if (n_mat != 2 || n_stream != 2 || n_done != 2 || n_clear != 2) begin failures++; $display("counts %0d %0d %0d %0d", n_mat, n_stream, n_done, n_clear); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
