// tb_online_adder: self-checking testbench of the on-line adder.
// Two random 8-digit signed-digit streams (every digit code, including both
// zeros) go in MSD first followed by zero digits; the output digits of
// cycles 0..10 must form x + y, the digits of cycles 0 and 1 must be zero
// (on-line delay 3 with one extra leading digit), and the following digits
// must stay zero.
module tb_online_adder;
  import sad_bist_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, clr, en;
  sd_digit_t x, y, z;
  int checks = 0, failures = 0;

  online_adder dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sd_digit_t xs [8], ys [8];
    int xv, yv, v;
    bit extra;
    rst_n = 1'b0; clr = 1'b0; en = 1'b0; x = '0; y = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      xv = 0; yv = 0;
      for (int k = 0; k < 8; k++) begin
        xs[k] = sd_digit_t'($urandom); ys[k] = sd_digit_t'($urandom);
        if (t == 0) begin xs[k] = '{neg: 1'b0, pos: 1'b1}; ys[k] = xs[k]; end
        if (t == 1) begin xs[k] = '{neg: 1'b1, pos: 1'b0}; ys[k] = xs[k]; end
        xv = 2 * xv + int'(xs[k].pos) - int'(xs[k].neg);
        yv = 2 * yv + int'(ys[k].pos) - int'(ys[k].neg);
      end
      @(negedge clk);
      clr = 1'b1; en = 1'b0;
      @(negedge clk);
      clr = 1'b0; en = 1'b1;
      v = 0; extra = 0;
      for (int s = 0; s < 14; s++) begin
        x = (s < 8) ? xs[s] : '0;
        y = (s < 8) ? ys[s] : '0;
        #1;
        if (s <= 1 && (z.pos != z.neg)) extra = 1;
        if (s <= 10) v = 2 * v + int'(z.pos) - int'(z.neg);
        else if (z.pos != z.neg) extra = 1;
        @(negedge clk);
      end
      en = 1'b0;
      checks++;
      if (v != xv + yv || extra) begin
        failures++; $display("FAIL %0d + %0d: got %0d (extra digits %0b)", xv, yv, v, extra);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
