// tb_pe: self-checking testbench of the processing element.
// Feeds random 16-pixel blocks, back to back and with idle cycles, with and
// without an injected stuck-at fault on either site, and compares the block
// SAD with a sum of absolute differences computed here. Also checks that the
// SAD is there right after the edge that takes the 16th pair.
module tb_pe;
  import sad_bist_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, en, first;
  logic [7:0] cur_pix, ref_pix;
  pe_fault_t fault;
  logic [11:0] sad_dash;
  int checks = 0, failures = 0;

  pe dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [11:0] got, input logic [11:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int unsigned sum, absd;
    logic [11:0] exp;
    rst_n = 1'b0; en = 1'b0; first = 1'b0; cur_pix = '0; ref_pix = '0; fault = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 200; b++) begin
      fault = '0;
      if (b % 3 == 1) begin
        fault.create_error = 1'b1;
        fault.site         = fault_site_e'($urandom_range(0, 1));
        fault.line         = 4'($urandom_range(0, fault.site == FAULT_SAD_BUS ? 11 : 7));
        fault.stuck_val    = 1'($urandom);
      end
      sum = 0;
      for (int p = 0; p < 16; p++) begin
        @(negedge clk);
        if (b % 4 == 2 && p == 5) begin       // an idle cycle inside a block
          en = 1'b0;
          @(negedge clk);
        end
        en = 1'b1; first = (p == 0);
        cur_pix = 8'($urandom); ref_pix = 8'($urandom);
        if (b % 5 == 0) ref_pix = cur_pix;    // zero differences
        if (b % 7 == 3) begin cur_pix = 8'hFF; ref_pix = 8'h00; end  // maximum SAD
        absd = (cur_pix > ref_pix) ? cur_pix - ref_pix : ref_pix - cur_pix;
        if (fault.create_error && fault.site == FAULT_ABSDIFF)
          absd = fault.stuck_val ? (absd | (1 << fault.line)) : (absd & ~(1 << fault.line));
        sum += absd;
      end
      @(negedge clk);
      en = 1'b0; first = 1'b0;
      exp = 12'(sum);
      if (fault.create_error && fault.site == FAULT_SAD_BUS) exp[fault.line] = fault.stuck_val;
      check(sad_dash, exp, $sformatf("block %0d", b));
      @(negedge clk);
      check(sad_dash, exp, $sformatf("block %0d held", b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
