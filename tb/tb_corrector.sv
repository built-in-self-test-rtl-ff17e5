// tb_corrector: self-checking testbench of the corrector.
// Every single-bit error of random SADs (both directions) must be corrected;
// error-free data must pass unchanged; for multi-bit errors the expected
// outcome is found here by brute force: if exactly the residues of the true
// SAD are reached by inverting one bit, that bit is inverted, otherwise the
// data passes unchanged and uncorrectable is raised.
module tb_corrector;
  import sad_bist_pkg::*;

  logic [11:0] select_out, cor_out;
  logic [3:0]  s_phi_1, s_phi_2;
  logic        corrected, uncorrectable;
  int checks = 0, failures = 0;
  int n_unc = 0;

  corrector dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int v, input int w);
    int e, fixed;
    logic exp_corr, exp_unc;
    select_out = 12'(w);
    e = w - v;
    s_phi_1 = 4'(((e % 7) + 7) % 7);
    s_phi_2 = 4'(((e % 15) + 15) % 15);
    #1;
    fixed = w; exp_corr = 1'b0;
    for (int k = 0; k < 12; k++) begin
      int c;
      c = w ^ (1 << k);
      if ((c % 7) == (v % 7) && (c % 15) == (v % 15)) begin
        fixed = c; exp_corr = 1'b1;
      end
    end
    exp_unc = (e % 105 != 0) && !exp_corr;
    if (exp_unc) n_unc++;
    checks++;
    if (cor_out !== 12'(fixed) || corrected !== exp_corr || uncorrectable !== exp_unc) begin
      failures++;
      $display("FAIL true %0d seen %0d: out %0d corr %0b unc %0b, expected %0d %0b %0b",
               v, w, cor_out, corrected, uncorrectable, fixed, exp_corr, exp_unc);
    end
  endtask

  initial begin
    int v;
    for (int t = 0; t < 200; t++) begin
      v = $urandom_range(0, 4080);
      apply(v, v);
      for (int k = 0; k < 12; k++) begin
        apply(v, v ^ (1 << k));
        checks++;
        if (cor_out !== 12'(v)) begin
          failures++; $display("FAIL single error bit %0d of %0d not corrected", k, v);
        end
      end
      apply(v, (v ^ 32'($urandom)) & 12'hFFF);
    end
    if (n_unc == 0) begin
      failures++; $display("FAIL no uncorrectable case seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
