// meca_bisdc: motion-estimation computing array with built-in
// self-detection and self-correction (BISDC).
//
// Sixteen PEs compute block SADs. For every block one PE is under test
// (round robin): the TCG computes the biresidue code (|SAD| mod 7,
// |SAD| mod 15) of that PE's block from the same pixels, the detector
// compares the PE's output with it, and the selector sends a correct value
// on, or sends a wrong one to the syndrome decoder and corrector, which
// locate and invert a single erroneous bit.
//
// Interface: one pixel pair per PE per cycle while pix_valid is high, 16
// pairs per block, blocks back to back or with gaps. The cycle after the
// edge that takes the 16th pair, the checks run, and on the next edge
// out_valid rises for one cycle with:
//   sad_out       all 16 block SADs, the tested PE's replaced by the
//                 checked (and if need be corrected) value
//   checked_sad   that checked value, tested_pe its PE
//   err_detected  the tested PE's output was wrong
//   err_corrected a single-bit error was located and corrected
//   err_uncorrectable  the error could not be located
// So a block's result appears 2 cycles after its last pair.
//
// A multibit_checker recomputes, for every third block or so, the tested
// PE's SAD with the on-line adder tree and compares it with the PE's SAD';
// it reports on mb_valid / mb_pe / mb_sad / mb_err about 21 cycles after
// the block's check and catches errors of any number of bits.
module meca_bisdc
  import sad_bist_pkg::*;
#(
  parameter int unsigned N  = NPE,
  parameter int unsigned PW = PIX_W,
  parameter int unsigned SW = SAD_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pix_valid,
  input  logic [PW-1:0]        cur_pix,
  input  logic [PW-1:0]        ref_pix      [N],
  input  pe_fault_t            fault        [N],
  output logic                 out_valid,
  output logic [SW-1:0]        sad_out      [N],
  output logic [SW-1:0]        checked_sad,
  output logic [$clog2(N)-1:0] tested_pe,
  output logic                 err_detected,
  output logic                 err_corrected,
  output logic                 err_uncorrectable,
  output logic                 mb_valid,
  output logic [$clog2(N)-1:0] mb_pe,
  output logic [SW-1:0]        mb_sad,
  output logic                 mb_err
);

  localparam int unsigned IW = $clog2(N);

  logic             first, eval;
  bisdc_ctrl_t      ctrl;
  logic [SW-1:0]    sad_dash [N];
  logic [RES_W-1:0] x_code, y_code;
  logic             det_err;
  logic [SW-1:0]    select_out, cor_out;
  logic             free_valid, sac_valid;
  logic [RES_W-1:0] s_phi_1, s_phi_2;
  logic             corrected, uncorrectable;
  logic [SW-1:0]    checked;

  bisdc_controller #(.N(N), .BLK(NPIX)) u_ctrl (
    .clk, .rst_n, .pix_valid, .first, .eval, .ctrl);

  meca_array #(.N(N), .PW(PW), .SW(SW)) u_cut (
    .clk, .rst_n, .en(pix_valid), .first, .cur_pix, .ref_pix,
    .fault, .sad_dash);

  tcg #(.N(N), .PW(PW)) u_tcg (
    .clk, .rst_n, .tc1(ctrl.tc1), .first, .tc2(IW'(ctrl.tc2)),
    .cur_pix, .ref_pix, .out_a(x_code), .out_b(y_code));

  detector #(.N(N), .SW(SW)) u_det (
    .sad_dash, .dc1(IW'(ctrl.dc1)), .x_code, .y_code, .err(det_err));

  selector #(.N(N), .SW(SW)) u_sel (
    .sad_dash, .sc1(IW'(ctrl.sc1)), .sc2(ctrl.sc2), .det_err,
    .select_out, .free_valid, .sac_valid);

  syndrome_decoder #(.SW(SW)) u_syn (
    .select_out, .x_code, .y_code, .s_phi_1, .s_phi_2);

  corrector #(.SW(SW)) u_cor (
    .select_out, .s_phi_1, .s_phi_2, .cor_out, .corrected, .uncorrectable);

  assign checked = sac_valid ? cor_out : select_out;

  multibit_checker #(.N(N), .BLK(NPIX), .PW(PW), .SW(SW)) u_mb (
    .clk, .rst_n, .pix_valid, .first, .cur_pix,
    .ref_sel (ref_pix[IW'(ctrl.tc2)]),
    .eval,
    .eval_pe (IW'(ctrl.sc1)),
    .pe_sad  (select_out),
    .mb_valid, .mb_pe, .mb_sad, .mb_err);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid         <= 1'b0;
      checked_sad       <= '0;
      tested_pe         <= '0;
      err_detected      <= 1'b0;
      err_corrected     <= 1'b0;
      err_uncorrectable <= 1'b0;
      for (int i = 0; i < int'(N); i++) sad_out[i] <= '0;
    end else begin
      out_valid <= eval;
      if (eval) begin
        checked_sad       <= checked;
        tested_pe         <= IW'(ctrl.sc1);
        err_detected      <= sac_valid;
        err_corrected     <= sac_valid && corrected;
        err_uncorrectable <= sac_valid && uncorrectable;
        for (int i = 0; i < int'(N); i++)
          sad_out[i] <= (i == int'(ctrl.sc1)) ? checked : sad_dash[i];
      end
    end
  end

  // Each checked block goes to exactly one of the two paths.
  assert property (@(posedge clk) disable iff (!rst_n)
                   eval |-> (free_valid != sac_valid));

  // The detector's verdict and the syndrome must agree.
  assert property (@(posedge clk) disable iff (!rst_n)
                   eval |-> (det_err == ((s_phi_1 != '0) || (s_phi_2 != '0))));

endmodule
