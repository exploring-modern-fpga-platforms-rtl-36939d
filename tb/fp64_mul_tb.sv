// fp64_mul_tb: checks the binary64 multiplier against the simulator's real
// multiply on random normal operands (results kept in the normal range),
// plus zero, overflow, underflow-flush and infinity cases. Results are
// compared bit for bit two cycles after issue; a stall cycle (en=0) is
// inserted every so often and must hold the pipeline.
module fp64_mul_tb;
  import tb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en;
  logic [63:0] a, b, y;
  int checks = 0, failures = 0;

  fp64_mul dut (.clk, .en, .a, .b, .y);

  localparam int N = 4000;
  logic [63:0] qa [N], qb [N], qe [N];

  initial begin
    for (int i = 0; i < N; i++) begin
      qa[i] = rand_f64(-300, 300, 1);
      qb[i] = rand_f64(-300, 300, 1);
      qe[i] = rmul(qa[i], qb[i]);
    end
    // Directed cases
    qa[0] = 64'h3ff0_0000_0000_0000; qb[0] = 64'h4000_0000_0000_0000; qe[0] = 64'h4000_0000_0000_0000;
    qa[1] = 64'h0;                    qb[1] = 64'h4010_0000_0000_0000; qe[1] = 64'h0;
    qa[2] = 64'h7fe0_0000_0000_0000;  qb[2] = 64'h4010_0000_0000_0000; qe[2] = 64'h7ff0_0000_0000_0000;
    qa[3] = 64'h0010_0000_0000_0000;  qb[3] = 64'h3f00_0000_0000_0000; qe[3] = 64'h0;
    qa[4] = 64'hfff0_0000_0000_0000;  qb[4] = 64'h4000_0000_0000_0000; qe[4] = 64'hfff0_0000_0000_0000;
    qa[5] = 64'h3fff_ffff_ffff_ffff;  qb[5] = 64'h3ff0_0000_0000_0001; qe[5] = rmul(qa[5], qb[5]);
  end

  // Drive with a 3-deep reference queue aligned to the pipeline.
  int issued = 0;
  int head = 0;
  int pend [$];
  initial begin
    en = 0; a = 0; b = 0;
    repeat (2) @(posedge clk);
    while (checks < N) begin
      @(negedge clk);
      en = ($urandom_range(7) != 0);
      if (issued < N) begin a = qa[issued]; b = qb[issued]; end
      @(posedge clk);
      #1;
      if (en) begin
        if (issued < N) begin pend.push_back(issued); issued++; end
        else pend.push_back(-1);
        if (pend.size() > 1) begin  // result of the operands issued two enabled edges ago
          head = pend.pop_front();
          if (head >= 0) begin
            checks++;
            if (y !== qe[head]) begin
              failures++;
              if (failures < 10) $display("MISMATCH %h * %h = %h expected %h", qa[head], qb[head], y, qe[head]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
