// plf_rcu_tb: one rate category of Eq. 2 plus the eigenvector product on
// random child entries, matrices and eigenvectors; one set per cycle, results
// compared bit for bit 14 cycles later against the real-arithmetic model.
module plf_rcu_tb;
  import tb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [3:0][63:0] vl, vr, y;
  logic [15:0][63:0] pl, pr, ev;
  int checks = 0, failures = 0;
  localparam int N = 300;
  logic [3:0][63:0] qvl [N], qvr [N], ex [N];
  logic [15:0][63:0] qpl [N], qpr [N];

  plf_rcu dut (.clk, .en(1'b1), .vl, .vr, .pl, .pr, .ev, .y);

  initial begin
    for (int i = 0; i < 16; i++) ev[i] = rand_f64(-2, 1, 1);
    for (int n = 0; n < N; n++) begin
      for (int i = 0; i < 4; i++) begin qvl[n][i] = rand_f64(-12, 0, 0); qvr[n][i] = rand_f64(-12, 0, 0); end
      for (int i = 0; i < 16; i++) begin qpl[n][i] = rand_f64(-5, -1, 0); qpr[n][i] = rand_f64(-5, -1, 0); end
      ex[n] = rrcu(qvl[n], qvr[n], qpl[n], qpr[n], ev);
    end
    for (int n = 0; n < N + 13; n++) begin
      vl <= qvl[n % N]; vr <= qvr[n % N]; pl <= qpl[n % N]; pr <= qpr[n % N];
      @(posedge clk);
      #1;
      if (n >= 13)
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (y[i] !== ex[n - 13][i]) begin
            failures++;
            if (failures < 5) $display("set %0d state %0d: %h vs %h", n - 13, i, y[i], ex[n - 13][i]);
          end
        end
    end
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
