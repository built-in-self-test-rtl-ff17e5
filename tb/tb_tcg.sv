// tb_tcg: self-checking testbench of the test code generator.
// Sixteen random reference streams; for each block tc2 names one of them and
// the two test codes must equal that stream's block SAD mod 7 and mod 15.
module tb_tcg;
  import sad_bist_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, tc1, first;
  logic [3:0] tc2;
  logic [7:0] cur_pix;
  logic [7:0] ref_pix [16];
  logic [3:0] out_a, out_b;
  int checks = 0, failures = 0;

  tcg dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned sum [16];
    rst_n = 1'b0; tc1 = 1'b0; first = 1'b0; tc2 = '0; cur_pix = '0;
    foreach (ref_pix[i]) ref_pix[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 100; b++) begin
      foreach (sum[i]) sum[i] = 0;
      tc2 = 4'($urandom);
      for (int p = 0; p < 16; p++) begin
        @(negedge clk);
        tc1 = 1'b1; first = (p == 0);
        cur_pix = 8'($urandom);
        foreach (ref_pix[i]) begin
          ref_pix[i] = 8'($urandom);
          sum[i] += (cur_pix > ref_pix[i]) ? cur_pix - ref_pix[i] : ref_pix[i] - cur_pix;
        end
      end
      @(negedge clk);
      tc1 = 1'b0;
      checks += 2;
      if (out_a != 4'(sum[tc2] % 7) || out_b != 4'(sum[tc2] % 15)) begin
        failures++;
        $display("FAIL block %0d PE %0d: SAD %0d codes %0d %0d", b, tc2, sum[tc2], out_a, out_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
