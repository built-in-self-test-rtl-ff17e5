// tb_online_adder_tree: self-checking testbench of the on-line adder tree.
// Sixteen random 8-digit signed-digit streams enter MSD first, followed by
// zeros; the 20 output digits (cycles 0..19) must form their sum, and the
// least significant one must leave 3*log2(16) = 12 cycles after the last
// input digit (no non-zero digit afterwards).
module tb_online_adder_tree;
  import sad_bist_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, clr, en;
  sd_digit_t leaf [16];
  sd_digit_t sum;
  int checks = 0, failures = 0;

  online_adder_tree dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sd_digit_t ds [16][8];
    int expv, v, lv;
    bit extra;
    rst_n = 1'b0; clr = 1'b0; en = 1'b0;
    foreach (leaf[i]) leaf[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      expv = 0;
      for (int i = 0; i < 16; i++) begin
        lv = 0;
        for (int k = 0; k < 8; k++) begin
          ds[i][k] = sd_digit_t'($urandom);
          if (t == 0) ds[i][k] = '{neg: 1'b0, pos: 1'b1};
          if (t == 1) ds[i][k] = '{neg: 1'b1, pos: 1'b0};
          lv = 2 * lv + int'(ds[i][k].pos) - int'(ds[i][k].neg);
        end
        expv += lv;
      end
      @(negedge clk);
      clr = 1'b1; en = 1'b0;
      @(negedge clk);
      clr = 1'b0; en = 1'b1;
      v = 0; extra = 0;
      for (int s = 0; s < 24; s++) begin
        foreach (leaf[i]) leaf[i] = (s < 8) ? ds[i][s] : '0;
        #1;
        if (s < 20) v = 2 * v + int'(sum.pos) - int'(sum.neg);
        else if (sum.pos != sum.neg) extra = 1;
        @(negedge clk);
      end
      en = 1'b0;
      checks++;
      if (v != expv || extra) begin
        failures++; $display("FAIL sum %0d: got %0d (extra %0b)", expv, v, extra);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
