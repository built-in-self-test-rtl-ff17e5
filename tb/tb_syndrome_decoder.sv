// tb_syndrome_decoder: self-checking testbench of the syndrome decoder.
// For random outputs N and true SADs the syndromes must equal the residues
// of the error e = N - SAD modulo 7 and 15 (worked out here with signed %).
// A directed case first: an error of -2 must give the syndromes (5, 13).
module tb_syndrome_decoder;
  import sad_bist_pkg::*;

  logic [11:0] select_out;
  logic [3:0]  x_code, y_code, s_phi_1, s_phi_2;
  int checks = 0, failures = 0;

  syndrome_decoder dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, w, e, e1, e2;
    select_out = 12'd998; x_code = 4'(1000 % 7); y_code = 4'(1000 % 15);
    #1;
    checks++;
    if (s_phi_1 != 4'd5 || s_phi_2 != 4'd13) begin
      failures++;
      $display("FAIL e=-2: got (%0d,%0d) expected (5,13)", s_phi_1, s_phi_2);
    end
    for (int t = 0; t < 3000; t++) begin
      v = $urandom_range(0, 4080);
      w = (t % 2) ? (v ^ (1 << $urandom_range(0, 11))) : $urandom_range(0, 4095);
      select_out = 12'(w);
      x_code = 4'(v % 7); y_code = 4'(v % 15);
      #1;
      e  = w - v;
      e1 = ((e % 7) + 7) % 7;
      e2 = ((e % 15) + 15) % 15;
      checks++;
      if (s_phi_1 != 4'(e1) || s_phi_2 != 4'(e2)) begin
        failures++;
        $display("FAIL e=%0d: got (%0d,%0d) expected (%0d,%0d)", e, s_phi_1, s_phi_2, e1, e2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
