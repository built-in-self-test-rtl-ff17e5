// tb_sad_bist_top: end-to-end testbench of the whole design at its default
// sizes (16 PEs, 4x4 blocks, 8-bit pixels).
// Both engines run at the same time:
//  * the BISDC array gets 64 blocks back to back (every PE is tested four
//    times) with stuck-at faults injected on the SAD bus and inside the PE
//    under test; each result is compared with a model kept here;
//  * the on-line processor runs 20 minimum-SAD searches of 8 candidates
//    each; every candidate and every search result is checked.
// Each mechanism must occur at least once: error-free check, detection,
// single-bit correction, uncorrectable error, multi-bit check (clean and
// error), every PE tested, back-to-back
// blocks, early stop, replacement of SAD_r, full-length candidate, search
// result. Every multi-bit checker report is compared with the true SAD of
// the latest block tested on the named PE and that PE's SAD'. The counts
// are printed.
module tb_sad_bist_top;
  import sad_bist_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic        me_pix_valid;
  logic [7:0]  me_cur_pix;
  logic [7:0]  me_ref_pix [16];
  pe_fault_t   me_fault [16];
  logic        me_out_valid;
  logic [11:0] me_sad_out [16];
  logic [11:0] me_checked_sad;
  logic [3:0]  me_tested_pe;
  logic        me_err_detected, me_err_corrected, me_err_uncorrectable;
  logic        me_mb_valid, me_mb_err;
  logic [3:0]  me_mb_pe;
  logic [11:0] me_mb_sad;
  int     mb_tru [16], mb_bad [16];
  longint mb_due [16];
  int n_mb_clean = 0, n_mb_err = 0;

  logic        ol_cand_valid, ol_cand_ready, ol_cand_first, ol_cand_last;
  logic [7:0]  ol_cand_pix [16], ol_ref_pix [16];
  logic        ol_cand_done, ol_cand_early, ol_result_valid;
  logic [11:0] ol_cand_sad, ol_min_sad;
  logic [7:0]  ol_mv;

  sad_bist_top dut (.*);

  int checks = 0, failures = 0;
  int n_clean = 0, n_det = 0, n_corr = 0, n_unc = 0, n_b2b = 0;
  int n_early = 0, n_update = 0, n_full = 0, n_result = 0;
  bit pe_tested [16];
  bit me_done = 0, ol_done = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- BISDC array ----------------
  typedef struct {
    int          tpe, v, w, fixed;
    logic        det, corr;
    int unsigned bad [16];
    longint      due;
  } exp_t;
  exp_t   expq [$];
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : me_driver
    int unsigned tru [16], bad [16];
    int tpe, absd, v, w;
    pe_fault_t nf [16];
    exp_t e;
    me_pix_valid = 1'b0; me_cur_pix = '0;
    foreach (me_ref_pix[i]) begin me_ref_pix[i] = '0; me_fault[i] = '0; end
    @(posedge rst_n);
    for (int b = 0; b < 64; b++) begin
      tpe = b % 16;
      foreach (nf[i]) nf[i] = '0;
      if (b % 4 == 1) begin
        nf[tpe].create_error = 1'b1;
        nf[tpe].site = FAULT_SAD_BUS;
        nf[tpe].line = 4'($urandom_range(0, 11));
        nf[tpe].stuck_val = 1'($urandom);
      end else if (b % 4 == 2) begin
        nf[tpe].create_error = 1'b1;
        nf[tpe].site = FAULT_ABSDIFF;
        nf[tpe].line = 4'($urandom_range(0, 7));
        nf[tpe].stuck_val = 1'($urandom);
      end
      foreach (tru[i]) begin tru[i] = 0; bad[i] = 0; end
      for (int p = 0; p < 16; p++) begin
        @(negedge clk);
        me_pix_valid = 1'b1;
        if (p == 1) me_fault = nf;     // faults follow the block from its 2nd pair
        me_cur_pix = 8'($urandom);
        foreach (me_ref_pix[i]) begin
          me_ref_pix[i] = 8'($urandom);
          absd = (me_cur_pix > me_ref_pix[i]) ? me_cur_pix - me_ref_pix[i]
                                              : me_ref_pix[i] - me_cur_pix;
          tru[i] += absd;
          if (me_fault[i].create_error && me_fault[i].site == FAULT_ABSDIFF)
            absd = me_fault[i].stuck_val ? (absd | (1 << me_fault[i].line))
                                         : (absd & ~(1 << me_fault[i].line));
          bad[i] += absd;
        end
      end
      foreach (bad[i])
        if (me_fault[i].create_error && me_fault[i].site == FAULT_SAD_BUS)
          bad[i] = me_fault[i].stuck_val ? (bad[i] | (1 << me_fault[i].line))
                                         : (bad[i] & ~(1 << me_fault[i].line));
      v = int'(tru[tpe]); w = int'(bad[tpe]);
      e.tpe = tpe; e.v = v; e.w = w; e.bad = bad;
      e.det = ((w % 7) != (v % 7)) || ((w % 15) != (v % 15));
      e.fixed = w; e.corr = 1'b0;
      if (e.det)
        for (int k = 0; k < 12; k++)
          if (((w ^ (1 << k)) % 7) == (v % 7) && ((w ^ (1 << k)) % 15) == (v % 15)) begin
            e.fixed = w ^ (1 << k); e.corr = 1'b1;
          end
      e.due = cycle + 2;
      expq.push_back(e);
      mb_tru[tpe] = v; mb_bad[tpe] = w; mb_due[tpe] = cycle + 22;
      if (b % 8 == 7) begin
        @(negedge clk);
        me_pix_valid = 1'b0;
      end else if (b != 63) n_b2b++;
    end
    @(negedge clk);
    me_pix_valid = 1'b0;
    repeat (25) @(negedge clk);
    me_done = 1;
  end

  always @(negedge clk) begin : mb_monitor
    if (rst_n && me_mb_valid) begin
      checks += 3;
      if (me_mb_sad !== 12'(mb_tru[me_mb_pe])) begin
        failures++; $display("FAIL multi-bit PE %0d: SAD %0d expected %0d", me_mb_pe, me_mb_sad, mb_tru[me_mb_pe]);
      end
      if (me_mb_err !== (mb_bad[me_mb_pe] != mb_tru[me_mb_pe])) begin
        failures++; $display("FAIL multi-bit PE %0d: mb_err %0b", me_mb_pe, me_mb_err);
      end
      if (cycle != mb_due[me_mb_pe]) begin
        failures++; $display("FAIL multi-bit PE %0d in cycle %0d, expected %0d", me_mb_pe, cycle, mb_due[me_mb_pe]);
      end
      if (me_mb_err) n_mb_err++; else n_mb_clean++;
    end
  end

  always @(negedge clk) begin : me_monitor
    exp_t e;
    if (rst_n && me_out_valid) begin
      if (expq.size() == 0) begin
        failures++; $display("FAIL array result without a block");
      end else begin
        e = expq.pop_front();
        checks += 2;
        if (cycle != e.due) begin
          failures++; $display("FAIL array result in cycle %0d, expected %0d", cycle, e.due);
        end
        if (me_tested_pe !== 4'(e.tpe) || me_err_detected !== e.det ||
            me_err_corrected !== e.corr || me_err_uncorrectable !== (e.det && !e.corr) ||
            me_checked_sad !== 12'(e.fixed)) begin
          failures++;
          $display("FAIL PE %0d true %0d seen %0d: det %0b corr %0b unc %0b out %0d",
                   me_tested_pe, e.v, e.w, me_err_detected, me_err_corrected,
                   me_err_uncorrectable, me_checked_sad);
        end
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (me_sad_out[i] !== ((i == e.tpe) ? 12'(e.fixed) : 12'(e.bad[i]))) begin
            failures++; $display("FAIL me_sad_out[%0d] = %0d", i, me_sad_out[i]);
          end
        end
        pe_tested[me_tested_pe] = 1'b1;
        if (!me_err_detected) n_clean++;
        if (me_err_detected) n_det++;
        if (me_err_corrected && me_checked_sad == 12'(e.v)) n_corr++;
        if (me_err_uncorrectable) n_unc++;
      end
    end
  end

  // ---------------- on-line minimum-SAD processor ----------------
  initial begin : ol_driver
    int tsad, best, best_idx, guard;
    ol_cand_valid = 1'b0; ol_cand_first = 1'b0; ol_cand_last = 1'b0;
    foreach (ol_cand_pix[i]) begin ol_cand_pix[i] = '0; ol_ref_pix[i] = '0; end
    @(posedge rst_n);
    for (int srch = 0; srch < 20; srch++) begin
      foreach (ol_ref_pix[i]) ol_ref_pix[i] = 8'($urandom);
      best = -1; best_idx = 0;
      for (int c = 0; c < 8; c++) begin
        tsad = 0;
        foreach (ol_cand_pix[i]) begin
          // candidates get closer to the reference on average as c grows
          ol_cand_pix[i] = ($urandom_range(0, 7) < c) ? ol_ref_pix[i] ^ 8'($urandom_range(0, 3))
                                                      : 8'($urandom);
          tsad += (ol_cand_pix[i] > ol_ref_pix[i]) ? ol_cand_pix[i] - ol_ref_pix[i]
                                                   : ol_ref_pix[i] - ol_cand_pix[i];
        end
        @(negedge clk);
        while (!ol_cand_ready) @(negedge clk);
        ol_cand_valid = 1'b1; ol_cand_first = (c == 0); ol_cand_last = (c == 7);
        @(negedge clk);           // taken at the edge just passed
        ol_cand_valid = 1'b0;
        guard = 0;
        while (!ol_cand_done && guard < 40) begin @(negedge clk); guard++; end
        checks++;
        if (ol_cand_early !== (best >= 0 && tsad > best)) begin
          failures++; $display("FAIL search %0d cand %0d SAD %0d best %0d: early %0b",
                               srch, c, tsad, best, ol_cand_early);
        end
        if (ol_cand_early) n_early++;
        else begin
          n_full++;
          checks++;
          if (ol_cand_sad !== 12'(tsad)) begin
            failures++; $display("FAIL candidate SAD %0d: got %0d", tsad, ol_cand_sad);
          end
        end
        if (best < 0 || tsad < best) begin
          if (best >= 0) n_update++;
          best = tsad; best_idx = c;
        end
        if (c == 7) begin
          checks++;
          if (!ol_result_valid || ol_min_sad !== 12'(best) || ol_mv !== 8'(best_idx)) begin
            failures++; $display("FAIL search %0d: valid %0b min %0d mv %0d expected %0d %0d",
                                 srch, ol_result_valid, ol_min_sad, ol_mv, best, best_idx);
          end else n_result++;
        end
      end
    end
    ol_done = 1;
  end

  initial begin
    int n_pe;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (me_done && ol_done);
    n_pe = 0;
    foreach (pe_tested[i]) if (pe_tested[i]) n_pe++;
    $display("array: error-free %0d detected %0d corrected %0d uncorrectable %0d PEs tested %0d back-to-back %0d",
             n_clean, n_det, n_corr, n_unc, n_pe, n_b2b);
    $display("multi-bit: clean %0d errors %0d", n_mb_clean, n_mb_err);
    $display("on-line: full %0d early stops %0d SAD_r replaced %0d results %0d",
             n_full, n_early, n_update, n_result);
    checks += 13;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d array results missing", expq.size()); end
    if (n_clean == 0)  begin failures++; $display("FAIL no error-free check"); end
    if (n_det == 0)    begin failures++; $display("FAIL no detection"); end
    if (n_corr == 0)   begin failures++; $display("FAIL no correction"); end
    if (n_unc == 0)    begin failures++; $display("FAIL no uncorrectable error"); end
    if (n_mb_clean == 0) begin failures++; $display("FAIL no clean multi-bit check"); end
    if (n_mb_err == 0) begin failures++; $display("FAIL no multi-bit error"); end
    if (n_pe != 16)    begin failures++; $display("FAIL not every PE tested"); end
    if (n_b2b == 0)    begin failures++; $display("FAIL no back-to-back blocks"); end
    if (n_early == 0)  begin failures++; $display("FAIL no early stop"); end
    if (n_update == 0) begin failures++; $display("FAIL SAD_r never replaced"); end
    if (n_full == 0)   begin failures++; $display("FAIL no full-length candidate"); end
    if (n_result != 20) begin failures++; $display("FAIL search results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
