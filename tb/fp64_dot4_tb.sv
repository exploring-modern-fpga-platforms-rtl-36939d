// fp64_dot4_tb: random 4-element dot products with mixed signs against the
// real-arithmetic reference in the same tree order; checks the 6-cycle
// latency by issuing one operand set per cycle and comparing 6 cycles later,
// then holds en low for some cycles and checks the output does not move.
module fp64_dot4_tb;
  import tb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 1;
  logic [3:0][63:0] a, b;
  logic [63:0] y, held;
  int checks = 0, failures = 0;
  localparam int N = 600;
  logic [63:0] ex [N];
  logic [3:0][63:0] qa [N], qb [N];

  fp64_dot4 dut (.clk, .en, .a, .b, .y);

  initial begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < 4; j++) begin qa[i][j] = rand_f64(-20, 20, 1); qb[i][j] = rand_f64(-20, 20, 1); end
      ex[i] = rdot4(qa[i], qb[i]);
    end
    for (int i = 0; i < N + 5; i++) begin
      a <= qa[i % N]; b <= qb[i % N];
      @(posedge clk);
      #1;
      if (i >= 5) begin
        checks++;
        if (y !== ex[i - 5]) begin failures++; $display("dot %0d: %h vs %h", i - 5, y, ex[i - 5]); end
      end
    end
    held = y;
    en = 0;
    repeat (5) @(posedge clk);
    #1 checks++;
    if (y !== held) failures++;
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
