// plf_site_scale_tb: sites whose entries are all below 2^-256 (including
// zeros and negative values) must come out multiplied by 2^256 with their
// weight reported; sites with any entry at or above 2^-256 must pass
// unchanged with weight 0. The boundary value 2^-256 itself is tested.
module plf_site_scale_tb;
  import tb_pkg::*;
  logic [15:0][63:0] si, so;
  logic [31:0] w, aw;
  logic scaled;
  int checks = 0, failures = 0;

  plf_site_scale dut (.site_in(si), .weight(w), .site_out(so), .scaled, .add_weight(aw));

  initial begin
    for (int n = 0; n < 400; n++) begin
      bit all_small;
      int mode;
      mode = n % 4;
      for (int i = 0; i < 16; i++) begin
        case (mode)
          0: si[i] = rand_f64(-600, -257, 1);
          1: si[i] = rand_f64(-100, 0, 1);
          2: si[i] = rand_f64(-600, -257, 1);
          default: si[i] = rand_f64(-300, -200, 1);
        endcase
      end
      if (mode == 2) si[$urandom_range(15)] = (n % 8 == 2) ? 64'h2ff0_0000_0000_0000 : 64'h0; // 2^-256 or zero
      w = 32'($urandom_range(1, 1000));
      #1;
      all_small = 1;
      for (int i = 0; i < 16; i++)
        if ($bitstoreal(si[i]) >= 2.0 ** (-256) || $bitstoreal(si[i]) <= -(2.0 ** (-256))) all_small = 0;
      checks++;
      if (scaled !== all_small || aw !== (all_small ? w : 32'd0)) begin
        failures++;
        $display("site %0d: scaled %0d expected %0d", n, scaled, all_small);
      end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (so[i] !== (all_small ? $realtobits($bitstoreal(si[i]) * (2.0 ** 256)) : si[i])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
