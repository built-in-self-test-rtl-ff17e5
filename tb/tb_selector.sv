// tb_selector: self-checking testbench of the data selector.
// Random PE outputs, PE index, enable and detector verdict; the selected
// value and the two path flags are compared with the expected routing.
module tb_selector;
  import sad_bist_pkg::*;

  logic [11:0] sad_dash [16];
  logic [3:0]  sc1;
  logic        sc2, det_err;
  logic [11:0] select_out;
  logic        free_valid, sac_valid;
  int checks = 0, failures = 0;

  selector dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] vals [16];
    for (int t = 0; t < 1000; t++) begin
      foreach (vals[i]) vals[i] = 12'($urandom);
      sad_dash = vals;
      sc1 = 4'($urandom); sc2 = 1'($urandom); det_err = 1'($urandom);
      #1;
      checks += 3;
      if (select_out !== vals[sc1]) begin
        failures++; $display("FAIL data for PE %0d", sc1);
      end
      if (free_valid !== (sc2 && !det_err)) begin
        failures++; $display("FAIL free_valid");
      end
      if (sac_valid !== (sc2 && det_err)) begin
        failures++; $display("FAIL sac_valid");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
