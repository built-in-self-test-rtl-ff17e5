// tb_online_comparator: self-checking testbench of the on-line comparator.
// Each SAD value T is given as a random signed-digit string of 20 digits
// (digit k = bit k of p minus bit k of q, with p - q = T). At every digit
// the early-stop flag must equal "the digits so far force the value above
// SAD_r", with that bound worked out here; a stop must never be raised for
// a value that is not above SAD_r; at the 20th digit value and less must be
// exact.
module tb_online_comparator;
  import sad_bist_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, clr, en;
  sd_digit_t z;
  logic [11:0] sad_r, value;
  logic sad_r_valid, stop, last, less;
  int checks = 0, failures = 0;
  int n_stop = 0;

  online_comparator dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tv, p, q, pre, rem;
    longint lowb;
    bit exp_stop;
    rst_n = 1'b0; clr = 1'b0; en = 1'b0; z = '0; sad_r = '0; sad_r_valid = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      tv = $urandom_range(0, 4080);
      q  = $urandom_range(0, 4095 - tv);
      p  = q + tv;
      sad_r = 12'($urandom_range(0, 4095));
      if (t % 4 == 0) sad_r = 12'(tv);
      sad_r_valid = (t % 8 != 1);
      @(negedge clk);
      clr = 1'b1; en = 1'b0;
      @(negedge clk);
      clr = 1'b0; en = 1'b1;
      pre = 0;
      for (int s = 0; s < 20; s++) begin
        // digits 0..7 are the leading zeros of a 20-digit stream
        z.pos = (s < 8) ? 1'b0 : 1'(p >> (19 - s));
        z.neg = (s < 8) ? 1'b0 : 1'(q >> (19 - s));
        #1;
        pre  = 2 * pre + int'(z.pos) - int'(z.neg);
        rem  = 19 - s;
        lowb = longint'(pre) * (longint'(1) << rem) - ((longint'(1) << rem) - 1);
        exp_stop = sad_r_valid && (lowb > longint'(sad_r));
        checks++;
        if (stop !== exp_stop || last !== (s == 19)) begin
          failures++; $display("FAIL T=%0d r=%0d step %0d: stop %0b last %0b", tv, sad_r, s, stop, last);
        end
        if (stop && tv <= int'(sad_r)) begin
          failures++; $display("FAIL unsound stop T=%0d r=%0d", tv, sad_r);
        end
        if (stop) n_stop++;
        if (s == 19) begin
          checks++;
          if (value !== 12'(tv) || less !== (!sad_r_valid || tv < int'(sad_r))) begin
            failures++; $display("FAIL T=%0d: value %0d less %0b", tv, value, less);
          end
        end
        @(negedge clk);
      end
      en = 1'b0;
    end
    checks++;
    if (n_stop == 0) begin failures++; $display("FAIL no early stop seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
