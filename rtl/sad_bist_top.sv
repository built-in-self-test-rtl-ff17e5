// sad_bist_top: the two SAD engines of this design, side by side.
//
//  * meca_bisdc: a 16-PE motion-estimation computing array that computes 16
//    candidate SADs per 4x4 block and checks one PE per block with a
//    biresidue code (moduli 7 and 15), correcting a single erroneous SAD bit,
//    and recomputes the tested PE's SAD now and then with the on-line adder
//    tree to catch multi-bit errors.
//  * min_sad_processor: an on-line (MSD-first, signed-digit) SAD engine that
//    searches the candidate with the smallest SAD and drops a candidate as
//    soon as its leading digits show it cannot win.
//
// The two share only clock and reset; their ports are brought out with the
// prefixes me_ (array) and ol_ (on-line processor). See the two modules for
// their protocols and timing.
module sad_bist_top
  import sad_bist_pkg::*;
#(
  parameter int unsigned N_PE  = NPE,
  parameter int unsigned N_PIX = NPIX,
  parameter int unsigned PW    = PIX_W,
  parameter int unsigned MV_W  = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // motion-estimation array with BISDC
  input  logic                         me_pix_valid,
  input  logic [PW-1:0]                me_cur_pix,
  input  logic [PW-1:0]                me_ref_pix      [N_PE],
  input  pe_fault_t                    me_fault        [N_PE],
  output logic                         me_out_valid,
  output logic [SAD_W-1:0]             me_sad_out      [N_PE],
  output logic [SAD_W-1:0]             me_checked_sad,
  output logic [$clog2(N_PE)-1:0]      me_tested_pe,
  output logic                         me_err_detected,
  output logic                         me_err_corrected,
  output logic                         me_err_uncorrectable,
  output logic                         me_mb_valid,
  output logic [$clog2(N_PE)-1:0]      me_mb_pe,
  output logic [SAD_W-1:0]             me_mb_sad,
  output logic                         me_mb_err,
  // on-line minimum-SAD processor
  input  logic                         ol_cand_valid,
  output logic                         ol_cand_ready,
  input  logic                         ol_cand_first,
  input  logic                         ol_cand_last,
  input  logic [PW-1:0]                ol_cand_pix [N_PIX],
  input  logic [PW-1:0]                ol_ref_pix  [N_PIX],
  output logic                         ol_cand_done,
  output logic                         ol_cand_early,
  output logic [PW+$clog2(N_PIX)-1:0]  ol_cand_sad,
  output logic                         ol_result_valid,
  output logic [PW+$clog2(N_PIX)-1:0]  ol_min_sad,
  output logic [MV_W-1:0]              ol_mv
);

  meca_bisdc #(.N(N_PE), .PW(PW), .SW(SAD_W)) u_meca (
    .clk, .rst_n,
    .pix_valid         (me_pix_valid),
    .cur_pix           (me_cur_pix),
    .ref_pix           (me_ref_pix),
    .fault             (me_fault),
    .out_valid         (me_out_valid),
    .sad_out           (me_sad_out),
    .checked_sad       (me_checked_sad),
    .tested_pe         (me_tested_pe),
    .err_detected      (me_err_detected),
    .err_corrected     (me_err_corrected),
    .err_uncorrectable (me_err_uncorrectable),
    .mb_valid          (me_mb_valid),
    .mb_pe             (me_mb_pe),
    .mb_sad            (me_mb_sad),
    .mb_err            (me_mb_err));

  min_sad_processor #(.N(N_PIX), .PW(PW), .MV_W(MV_W)) u_online (
    .clk, .rst_n,
    .cand_valid   (ol_cand_valid),
    .cand_ready   (ol_cand_ready),
    .cand_first   (ol_cand_first),
    .cand_last    (ol_cand_last),
    .cand_pix     (ol_cand_pix),
    .ref_pix      (ol_ref_pix),
    .cand_done    (ol_cand_done),
    .cand_early   (ol_cand_early),
    .cand_sad     (ol_cand_sad),
    .result_valid (ol_result_valid),
    .min_sad      (ol_min_sad),
    .mv           (ol_mv));

endmodule
