// tb_sd_abs: self-checking testbench of the on-line absolute difference.
// Random and corner pixel pairs are fed MSB first; the output digits, read
// in the same cycles (no on-line delay), must form |c - r| and every prefix
// of them must be non-negative.
module tb_sd_abs;
  import sad_bist_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, clr, en, c_bit, r_bit;
  sd_digit_t z;
  int checks = 0, failures = 0;

  sd_abs dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] c, r;
    int v;
    bit neg_prefix;
    rst_n = 1'b0; clr = 1'b0; en = 1'b0; c_bit = 1'b0; r_bit = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      c = 8'($urandom); r = 8'($urandom);
      if (t == 0) begin c = 8'h00; r = 8'hFF; end
      if (t == 1) begin c = 8'hFF; r = 8'h00; end
      if (t % 10 == 5) r = c;
      if (t % 10 == 6) r = c ^ 8'h01;
      @(negedge clk);
      clr = 1'b1; en = 1'b0;
      @(negedge clk);
      clr = 1'b0; en = 1'b1;
      v = 0; neg_prefix = 0;
      for (int k = 7; k >= 0; k--) begin
        c_bit = c[k]; r_bit = r[k];
        #1;
        v = 2 * v + int'(z.pos) - int'(z.neg);
        if (v < 0) neg_prefix = 1;
        @(negedge clk);
      end
      en = 1'b0;
      checks++;
      if (v != ((c > r) ? c - r : r - c) || neg_prefix) begin
        failures++; $display("FAIL c=%0d r=%0d: got %0d", c, r, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
