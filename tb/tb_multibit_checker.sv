// tb_multibit_checker: self-checking testbench of the multi-bit checker.
// This bench plays the array's controller: it streams 16-pair blocks back to
// back (with an occasional gap), raises eval in the cycle after each block's
// last pair, and presents as the PE's SAD' either the true SAD or a copy with
// several bits wrong. Every report must name the PE of a block, give that
// block's true SAD, flag exactly the blocks whose SAD' differs, and come 21
// cycles after that block's eval. At least a third of the blocks must be
// checked, and both outcomes must occur.
module tb_multibit_checker;
  import sad_bist_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        rst_n, pix_valid, first, eval;
  logic [7:0]  cur_pix, ref_sel;
  logic [3:0]  eval_pe, mb_pe;
  logic [11:0] pe_sad, mb_sad;
  logic        mb_valid, mb_err;
  int checks = 0, failures = 0;
  int n_rep = 0, n_err = 0, n_ok = 0;

  multibit_checker dut (.*);

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int     blk_tru [16];
  int     blk_sad [16];
  longint blk_eval [16];
  bit     done = 0;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pending check of the block just streamed
  int p_pe, p_tru, p_sad;
  bit pend = 0;

  task automatic apply_eval();
    eval = 1'b1; eval_pe = 4'(p_pe); pe_sad = 12'(p_sad);
    blk_tru[p_pe] = p_tru; blk_sad[p_pe] = p_sad; blk_eval[p_pe] = cycle;
    pend = 0;
  endtask

  initial begin : driver
    int tru;
    rst_n = 1'b0; pix_valid = 1'b0; first = 1'b0; eval = 1'b0;
    cur_pix = '0; ref_sel = '0; eval_pe = '0; pe_sad = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 64; b++) begin
      tru = 0;
      for (int p = 0; p < 16; p++) begin
        @(negedge clk);
        eval = 1'b0;
        // back to back: the previous block's eval shares this first pair's cycle
        if (p == 0 && pend) apply_eval();
        pix_valid = 1'b1; first = (p == 0);
        cur_pix = 8'($urandom); ref_sel = 8'($urandom);
        tru += (cur_pix > ref_sel) ? int'(cur_pix - ref_sel) : int'(ref_sel - cur_pix);
      end
      p_pe = b % 16; p_tru = tru;
      // odd blocks: SAD' with one or more wrong bits
      p_sad = (b % 2 == 1) ? int'(12'(tru) ^ 12'($urandom_range(1, 4095))) : tru;
      pend = 1;
      if (b % 5 == 4 || b == 63) begin   // a gap: eval alone in its cycle
        @(negedge clk);
        pix_valid = 1'b0; first = 1'b0;
        apply_eval();
      end
    end
    @(negedge clk);
    eval = 1'b0; pix_valid = 1'b0; first = 1'b0;
    repeat (30) @(negedge clk);
    done = 1;
  end

  always @(negedge clk) begin : monitor
    if (rst_n && mb_valid) begin
      n_rep++;
      checks += 3;
      if (mb_sad !== 12'(blk_tru[mb_pe])) begin
        failures++; $display("FAIL PE %0d: SAD %0d expected %0d", mb_pe, mb_sad, blk_tru[mb_pe]);
      end
      if (mb_err !== (blk_sad[mb_pe] != blk_tru[mb_pe])) begin
        failures++; $display("FAIL PE %0d: mb_err %0b", mb_pe, mb_err);
      end
      if (cycle - blk_eval[mb_pe] != 21) begin
        failures++; $display("FAIL PE %0d: reported %0d cycles after eval", mb_pe, cycle - blk_eval[mb_pe]);
      end
      if (mb_err) n_err++; else n_ok++;
    end
  end

  initial begin
    wait (done);
    $display("reports %0d (errors %0d, clean %0d)", n_rep, n_err, n_ok);
    checks += 3;
    if (n_rep < 64 / 3) begin failures++; $display("FAIL too few blocks checked"); end
    if (n_err == 0) begin failures++; $display("FAIL no error reported"); end
    if (n_ok == 0)  begin failures++; $display("FAIL no clean block reported"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
