// tb_detector: self-checking testbench of the error detector.
// The test codes are the residues of a true SAD; the selected PE output is
// either that SAD or a corrupted copy (one bit, several bits, or a change
// that is a multiple of 105 and so invisible to both moduli). The flag must
// equal "residue mod 7 or mod 15 differs", worked out here with %.
module tb_detector;
  import sad_bist_pkg::*;

  logic [11:0] sad_dash [16];
  logic [3:0]  dc1, x_code, y_code;
  logic        err;
  int checks = 0, failures = 0;
  int n_err = 0;

  detector dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned v, w;
    logic exp;
    for (int t = 0; t < 3000; t++) begin
      foreach (sad_dash[i]) sad_dash[i] = 12'($urandom_range(0, 4080));
      dc1 = 4'($urandom);
      v = $urandom_range(0, 4080);
      case (t % 4)
        0: w = v;
        1: w = v ^ (1 << $urandom_range(0, 11));
        2: w = (v ^ 32'($urandom)) & 12'hFFF;
        default: w = (v + 105 <= 4095) ? v + 105 : v - 105;
      endcase
      sad_dash[dc1] = 12'(w);
      x_code = 4'(v % 7);
      y_code = 4'(v % 15);
      #1;
      exp = ((w % 7) != (v % 7)) || ((w % 15) != (v % 15));
      checks++;
      if (exp) n_err++;
      if (err !== exp) begin
        failures++;
        $display("FAIL true %0d seen %0d: err %0b expected %0b", v, w, err, exp);
      end
    end
    if (n_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
