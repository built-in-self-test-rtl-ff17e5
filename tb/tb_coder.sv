// tb_coder: self-checking testbench of the residue coder.
// Two coders (moduli 7 and 15) see the same random blocks; their residues
// after 16 pairs are compared with the block SAD reduced by the % operator.
module tb_coder;
  import sad_bist_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, en, first;
  logic [7:0] cur_pix, ref_pix;
  logic [3:0] res7, res15;
  int checks = 0, failures = 0;

  coder #(.A(3)) dut7  (.clk, .rst_n, .en, .first, .cur_pix, .ref_pix, .res(res7));
  coder #(.A(4)) dut15 (.clk, .rst_n, .en, .first, .cur_pix, .ref_pix, .res(res15));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned sum;
    rst_n = 1'b0; en = 1'b0; first = 1'b0; cur_pix = '0; ref_pix = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 300; b++) begin
      sum = 0;
      for (int p = 0; p < 16; p++) begin
        @(negedge clk);
        en = 1'b1; first = (p == 0);
        cur_pix = 8'($urandom); ref_pix = 8'($urandom);
        if (b % 9 == 4) begin cur_pix = 8'hFF; ref_pix = 8'h00; end
        sum += (cur_pix > ref_pix) ? cur_pix - ref_pix : ref_pix - cur_pix;
      end
      @(negedge clk);
      en = 1'b0;
      checks += 2;
      if (res7 != 4'(sum % 7)) begin
        failures++; $display("FAIL mod 7: block SAD %0d got %0d", sum, res7);
      end
      if (res15 != 4'(sum % 15)) begin
        failures++; $display("FAIL mod 15: block SAD %0d got %0d", sum, res15);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
