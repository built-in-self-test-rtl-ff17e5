// tb_bisdc_controller: self-checking testbench of the BISDC controller.
// Random pixel-valid patterns; a cycle model kept here predicts first, the
// check strobe (sc2, one cycle after the 16th pair), and the round-robin PE
// indices on tc2 and dc1/sc1.
module tb_bisdc_controller;
  import sad_bist_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, pix_valid, first, eval;
  bisdc_ctrl_t ctrl;
  int checks = 0, failures = 0;
  int n_eval = 0;

  bisdc_controller dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt = 0, acc = 0, ev_idx = 0;
    bit ev = 0;
    rst_n = 1'b0; pix_valid = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      pix_valid = (t < 2000) ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (first !== (cnt == 0) || ctrl.tc1 !== pix_valid || ctrl.tc2 !== 4'(acc) ||
          eval !== ev || ctrl.sc2 !== ev ||
          (ev && (ctrl.dc1 !== 4'(ev_idx) || ctrl.sc1 !== 4'(ev_idx)))) begin
        failures++;
        $display("FAIL t=%0d cnt=%0d acc=%0d ev=%0b: first %0b eval %0b tc2 %0d dc1 %0d",
                 t, cnt, acc, ev, first, eval, ctrl.tc2, ctrl.dc1);
      end
      if (ev) n_eval++;
      // model of the next edge
      ev = 0;
      if (pix_valid) begin
        if (cnt == 15) begin
          cnt = 0; ev = 1; ev_idx = acc; acc = (acc + 1) % 16;
        end else cnt++;
      end
    end
    checks++;
    if (n_eval < 16) begin failures++; $display("FAIL too few blocks"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
