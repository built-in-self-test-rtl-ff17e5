// tb_meca_array: self-checking testbench of the 16-PE array.
// Each block gives every PE its own random reference stream and one random
// PE a stuck-at fault on its SAD bus; all 16 SADs are compared with sums
// worked out here.
module tb_meca_array;
  import sad_bist_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, en, first;
  logic [7:0] cur_pix;
  logic [7:0] ref_pix [16];
  pe_fault_t fault [16];
  logic [11:0] sad_dash [16];
  int checks = 0, failures = 0;

  meca_array dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned sum [16];
    logic [11:0] exp;
    int fpe;
    rst_n = 1'b0; en = 1'b0; first = 1'b0; cur_pix = '0;
    foreach (ref_pix[i]) begin ref_pix[i] = '0; fault[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 60; b++) begin
      foreach (sum[i]) sum[i] = 0;
      foreach (fault[i]) fault[i] = '0;
      fpe = $urandom_range(0, 15);
      fault[fpe].create_error = 1'b1;
      fault[fpe].site         = FAULT_SAD_BUS;
      fault[fpe].line         = 4'($urandom_range(0, 11));
      fault[fpe].stuck_val    = 1'($urandom);
      for (int p = 0; p < 16; p++) begin
        @(negedge clk);
        en = 1'b1; first = (p == 0);
        cur_pix = 8'($urandom);
        foreach (ref_pix[i]) begin
          ref_pix[i] = 8'($urandom);
          sum[i] += (cur_pix > ref_pix[i]) ? cur_pix - ref_pix[i] : ref_pix[i] - cur_pix;
        end
      end
      @(negedge clk);
      en = 1'b0;
      for (int i = 0; i < 16; i++) begin
        exp = 12'(sum[i]);
        if (i == fpe) exp[fault[i].line] = fault[i].stuck_val;
        checks++;
        if (sad_dash[i] !== exp) begin
          failures++; $display("FAIL block %0d PE %0d: got %0d expected %0d", b, i, sad_dash[i], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
