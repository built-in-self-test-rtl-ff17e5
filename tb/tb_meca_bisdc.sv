// tb_meca_bisdc: self-checking testbench of the BISDC array.
// Streams blocks back to back and, in some blocks, injects a stuck-at fault
// into the PE under test (SAD bus: single-bit error; |c - r| bus: usually a
// multi-bit error) or into another PE (not checked in that block). A model
// kept here predicts every PE's faulty SAD, the detector's verdict (residue
// mod 7 or mod 15 differs), the corrector's result (the one bit whose
// inversion restores both residues, if any) and the outputs; the result must
// appear 2 cycles after the block's last pair. Blocks stream back to back,
// with an idle cycle after every eighth. The injected faults of a block are
// switched on with its second pair and stay until the next block's second.
// Detection, correction and an uncorrectable error must each happen at least
// once.
// The multi-bit checker's reports are checked too: each must give the true
// SAD of the latest block tested on the named PE, flag it exactly when that
// PE's SAD' was wrong, and come 22 cycles after the block's last pair. It
// must flag at least one error, and the number of such errors that the
// residue check missed or miscorrected is printed.
module tb_meca_bisdc;
  import sad_bist_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        rst_n, pix_valid;
  logic [7:0]  cur_pix;
  logic [7:0]  ref_pix [16];
  pe_fault_t   fault [16];
  logic        out_valid;
  logic [11:0] sad_out [16];
  logic [11:0] checked_sad;
  logic [3:0]  tested_pe;
  logic        err_detected, err_corrected, err_uncorrectable;
  logic        mb_valid, mb_err;
  logic [3:0]  mb_pe;
  logic [11:0] mb_sad;
  int     mb_tru [16], mb_bad [16], mb_res_ok [16];
  longint mb_due [16];
  int n_mb = 0, n_mb_err = 0, n_mb_beyond = 0;
  int checks = 0, failures = 0;
  int n_det = 0, n_corr = 0, n_unc = 0;

  meca_bisdc dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int          tpe;
    int          v, w, fixed;
    logic        det, corr;
    int unsigned bad [16];
    longint      due;         // cycle in which out_valid must be high
  } exp_t;
  exp_t   expq [$];
  longint cycle = 0;
  bit     driving_done = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // driver: blocks back to back, with an idle cycle now and then
  initial begin
    int unsigned tru [16], bad [16];
    int tpe, absd, v, w;
    pe_fault_t nf [16];
    exp_t e;
    rst_n = 1'b0; pix_valid = 1'b0; cur_pix = '0;
    foreach (ref_pix[i]) begin ref_pix[i] = '0; fault[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 96; b++) begin
      tpe = b % 16;
      foreach (nf[i]) nf[i] = '0;
      case (b % 4)
        1: begin   // single stuck-at on the tested PE's SAD bus
          nf[tpe].create_error = 1'b1;
          nf[tpe].site = FAULT_SAD_BUS;
          nf[tpe].line = 4'($urandom_range(0, 11));
          nf[tpe].stuck_val = 1'($urandom);
        end
        2: begin   // stuck-at inside the tested PE
          nf[tpe].create_error = 1'b1;
          nf[tpe].site = FAULT_ABSDIFF;
          nf[tpe].line = 4'($urandom_range(0, 7));
          nf[tpe].stuck_val = 1'($urandom);
        end
        3: begin   // fault in a PE that is not under test
          nf[(tpe + 5) % 16].create_error = 1'b1;
          nf[(tpe + 5) % 16].line = 4'($urandom_range(0, 11));
          nf[(tpe + 5) % 16].stuck_val = 1'($urandom);
        end
        default: ;
      endcase
      foreach (tru[i]) begin tru[i] = 0; bad[i] = 0; end
      for (int p = 0; p < 16; p++) begin
        @(negedge clk);
        pix_valid = 1'b1;
        // a block's faults are applied from its second pair on, so that the
        // previous block is still checked with its own faults in place
        if (p == 1) fault = nf;
        cur_pix = 8'($urandom);
        foreach (ref_pix[i]) begin
          ref_pix[i] = 8'($urandom);
          absd = (cur_pix > ref_pix[i]) ? cur_pix - ref_pix[i] : ref_pix[i] - cur_pix;
          tru[i] += absd;
          if (fault[i].create_error && fault[i].site == FAULT_ABSDIFF)
            absd = fault[i].stuck_val ? (absd | (1 << fault[i].line))
                                      : (absd & ~(1 << fault[i].line));
          bad[i] += absd;
        end
      end
      foreach (bad[i])
        if (fault[i].create_error && fault[i].site == FAULT_SAD_BUS)
          bad[i] = fault[i].stuck_val ? (bad[i] | (1 << fault[i].line))
                                      : (bad[i] & ~(1 << fault[i].line));
      v = int'(tru[tpe]); w = int'(bad[tpe]);
      e.tpe = tpe; e.v = v; e.w = w; e.bad = bad;
      e.det = ((w % 7) != (v % 7)) || ((w % 15) != (v % 15));
      e.fixed = w; e.corr = 1'b0;
      if (e.det)
        for (int k = 0; k < 12; k++)
          if (((w ^ (1 << k)) % 7) == (v % 7) && ((w ^ (1 << k)) % 15) == (v % 15)) begin
            e.fixed = w ^ (1 << k); e.corr = 1'b1;
          end
      // the last pair is taken at the coming edge (end of cycle "cycle");
      // the check runs in the next cycle and out_valid follows one later
      e.due = cycle + 2;
      expq.push_back(e);
      mb_tru[tpe] = v; mb_bad[tpe] = w; mb_due[tpe] = cycle + 22;
      mb_res_ok[tpe] = (e.fixed == v) || (e.det && !e.corr);
      if (b % 8 == 7) begin      // a gap between blocks
        @(negedge clk);
        pix_valid = 1'b0;
      end
    end
    @(negedge clk);
    pix_valid = 1'b0;
    repeat (4) @(negedge clk);
    driving_done = 1;
  end

  // monitor: every out_valid must match the oldest expected block, on time
  always @(negedge clk) begin
    exp_t e;
    if (rst_n && out_valid) begin
      if (expq.size() == 0) begin
        failures++; $display("FAIL out_valid without a block");
      end else begin
        e = expq.pop_front();
        checks += 2;
        if (cycle != e.due) begin
          failures++; $display("FAIL result in cycle %0d, expected %0d", cycle, e.due);
        end
        if (tested_pe !== 4'(e.tpe) || err_detected !== e.det || err_corrected !== e.corr ||
            err_uncorrectable !== (e.det && !e.corr) || checked_sad !== 12'(e.fixed)) begin
          failures++;
          $display("FAIL PE %0d true %0d seen %0d: det %0b corr %0b unc %0b out %0d",
                   tested_pe, e.v, e.w, err_detected, err_corrected, err_uncorrectable, checked_sad);
        end
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (sad_out[i] !== ((i == e.tpe) ? 12'(e.fixed) : 12'(e.bad[i]))) begin
            failures++; $display("FAIL sad_out[%0d] = %0d", i, sad_out[i]);
          end
        end
        if (err_detected) n_det++;
        if (err_corrected) n_corr++;
        if (err_uncorrectable) n_unc++;
      end
    end
  end

  // multi-bit checker reports
  always @(negedge clk) begin
    if (rst_n && mb_valid) begin
      n_mb++;
      checks += 3;
      if (mb_sad !== 12'(mb_tru[mb_pe])) begin
        failures++; $display("FAIL multi-bit PE %0d: SAD %0d expected %0d", mb_pe, mb_sad, mb_tru[mb_pe]);
      end
      if (mb_err !== (mb_bad[mb_pe] != mb_tru[mb_pe])) begin
        failures++; $display("FAIL multi-bit PE %0d: mb_err %0b", mb_pe, mb_err);
      end
      if (cycle != mb_due[mb_pe]) begin
        failures++; $display("FAIL multi-bit PE %0d in cycle %0d, expected %0d", mb_pe, cycle, mb_due[mb_pe]);
      end
      if (mb_err) n_mb_err++;
      if (mb_err && !mb_res_ok[mb_pe]) n_mb_beyond++;
    end
  end

  initial begin
    wait (driving_done);
    repeat (25) @(negedge clk);
    $display("multi-bit reports %0d, errors %0d (residue check wrong on %0d)",
             n_mb, n_mb_err, n_mb_beyond);
    checks += 2;
    if (n_mb < 96 / 3) begin failures++; $display("FAIL too few multi-bit checks"); end
    if (n_mb_err == 0) begin failures++; $display("FAIL no multi-bit error reported"); end
    $display("detected %0d corrected %0d uncorrectable %0d", n_det, n_corr, n_unc);
    checks += 4;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d results missing", expq.size()); end
    if (n_det == 0)  begin failures++; $display("FAIL no error detected"); end
    if (n_corr == 0) begin failures++; $display("FAIL no error corrected"); end
    if (n_unc == 0)  begin failures++; $display("FAIL no uncorrectable error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
