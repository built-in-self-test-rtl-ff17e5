// tb_min_sad_processor: self-checking testbench of the on-line minimum-SAD
// search.
// Runs searches of 2..12 candidates against random reference blocks; some
// candidates are the reference plus small noise (small SAD), some random
// (large SAD). A model kept here tracks SAD_r. Every candidate must end:
//  * early (cand_early) exactly when SAD_r is valid and the candidate's SAD
//    exceeds it, in fewer than 21 clock edges after it was taken,
//  * otherwise after exactly 21 edges (1 load + 20 digits) with cand_sad
//    equal to its SAD.
// After the last candidate min_sad and mv must be the smallest SAD and the
// index of its first candidate. Early stops that save cycles must occur.
module tb_min_sad_processor;
  import sad_bist_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        rst_n, cand_valid, cand_ready, cand_first, cand_last;
  logic [7:0]  cand_pix [16], ref_pix [16];
  logic        cand_done, cand_early, result_valid;
  logic [11:0] cand_sad, min_sad;
  logic [7:0]  mv;
  int checks = 0, failures = 0;
  int n_early = 0, n_saved = 0, n_update = 0, n_full = 0;

  min_sad_processor dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k_cand, tsad, best, best_idx, edges;
    bit seen_result;
    rst_n = 1'b0; cand_valid = 1'b0; cand_first = 1'b0; cand_last = 1'b0;
    foreach (cand_pix[i]) begin cand_pix[i] = '0; ref_pix[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int srch = 0; srch < 60; srch++) begin
      k_cand = $urandom_range(2, 12);
      foreach (ref_pix[i]) ref_pix[i] = 8'($urandom);
      best = -1; best_idx = 0;
      for (int c = 0; c < k_cand; c++) begin
        tsad = 0;
        foreach (cand_pix[i]) begin
          case ($urandom_range(0, 2))
            0: cand_pix[i] = 8'($urandom);
            1: cand_pix[i] = ref_pix[i] ^ 8'($urandom_range(0, 7));
            default: cand_pix[i] = ref_pix[i];
          endcase
          if (srch == 0 && c == 1) cand_pix[i] = ref_pix[i];   // SAD 0
          if (srch == 1) cand_pix[i] = ref_pix[i];             // ties
          tsad += (cand_pix[i] > ref_pix[i]) ? cand_pix[i] - ref_pix[i]
                                              : ref_pix[i] - cand_pix[i];
        end
        cand_valid = 1'b1; cand_first = (c == 0); cand_last = (c == k_cand - 1);
        checks++;
        if (!cand_ready) begin failures++; $display("FAIL not ready"); end
        @(posedge clk);           // taken here
        edges = 1;
        @(negedge clk);
        cand_valid = 1'b0;
        seen_result = 0;
        while (!cand_done) begin
          @(posedge clk); edges++;
          @(negedge clk);
          if (edges > 40) break;
        end
        checks += 2;
        if (cand_early !== (best >= 0 && tsad > best)) begin
          failures++; $display("FAIL search %0d cand %0d SAD %0d best %0d: early %0b",
                               srch, c, tsad, best, cand_early);
        end
        if (cand_early) begin
          n_early++;
          if (edges < 21) n_saved++;
          if (edges > 21) begin failures++; $display("FAIL early stop took %0d edges", edges); end
        end else begin
          n_full++;
          if (edges != 21 || cand_sad !== 12'(tsad)) begin
            failures++; $display("FAIL cand SAD %0d: got %0d after %0d edges", tsad, cand_sad, edges);
          end
        end
        if (best < 0 || tsad < best) begin
          if (best >= 0) n_update++;
          best = tsad; best_idx = c;
        end
        if (result_valid) seen_result = 1;
        checks++;
        if (seen_result !== (c == k_cand - 1)) begin
          failures++; $display("FAIL result_valid at candidate %0d of %0d", c, k_cand);
        end
        if (seen_result) begin
          checks++;
          if (min_sad !== 12'(best) || mv !== 8'(best_idx)) begin
            failures++; $display("FAIL search %0d: min %0d mv %0d expected %0d %0d",
                                 srch, min_sad, mv, best, best_idx);
          end
        end
      end
    end
    $display("full %0d early %0d (saving cycles %0d) SAD_r updates %0d", n_full, n_early, n_saved, n_update);
    checks += 2;
    if (n_saved == 0)  begin failures++; $display("FAIL no early stop saved cycles"); end
    if (n_update == 0) begin failures++; $display("FAIL SAD_r never replaced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
