// tb_online_sad: self-checking testbench of the on-line SAD unit.
// Random and corner 4x4 blocks are fed one bit plane per cycle, MSB first,
// then zeros; the 20 output digits must form the SAD computed here, and no
// digit may follow them.
module tb_online_sad;
  import sad_bist_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, clr, en;
  logic c_bits [16], r_bits [16];
  sd_digit_t z;
  int checks = 0, failures = 0;

  online_sad dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] c [16], r [16];
    int expv, v;
    bit extra;
    rst_n = 1'b0; clr = 1'b0; en = 1'b0;
    foreach (c_bits[i]) begin c_bits[i] = 1'b0; r_bits[i] = 1'b0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      expv = 0;
      for (int i = 0; i < 16; i++) begin
        c[i] = 8'($urandom); r[i] = 8'($urandom);
        if (t == 0) begin c[i] = 8'hFF; r[i] = 8'h00; end
        if (t == 1) begin c[i] = 8'h00; r[i] = 8'hFF; end
        if (t == 2) r[i] = c[i];
        expv += (c[i] > r[i]) ? c[i] - r[i] : r[i] - c[i];
      end
      @(negedge clk);
      clr = 1'b1; en = 1'b0;
      @(negedge clk);
      clr = 1'b0; en = 1'b1;
      v = 0; extra = 0;
      for (int s = 0; s < 24; s++) begin
        for (int i = 0; i < 16; i++) begin
          c_bits[i] = (s < 8) ? c[i][7-s] : 1'b0;
          r_bits[i] = (s < 8) ? r[i][7-s] : 1'b0;
        end
        #1;
        if (s < 20) v = 2 * v + int'(z.pos) - int'(z.neg);
        else if (z.pos != z.neg) extra = 1;
        @(negedge clk);
      end
      en = 1'b0;
      checks++;
      if (v != expv || extra) begin
        failures++; $display("FAIL SAD %0d: got %0d", expv, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
