// meca_array: the motion-estimation computing array (the circuit under test).
//
// N processing elements (4x4 = 16 by default), each computing the SAD of
// the current block against its own candidate reference block. The current
// pixel is broadcast to every PE; each PE receives its own reference pixel
// in the same cycle. The document draws the reference pixels entering the
// bottom row through two multiplexers and moving up the array; that
// movement is not described, so here the reference pixel of each PE is an
// input of its own. Each PE has its own fault-injection controls (see pe).
module meca_array
  import sad_bist_pkg::*;
#(
  parameter int unsigned N  = NPE,
  parameter int unsigned PW = PIX_W,
  parameter int unsigned SW = SAD_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          first,
  input  logic [PW-1:0] cur_pix,
  input  logic [PW-1:0] ref_pix      [N],
  input  pe_fault_t     fault        [N],
  output logic [SW-1:0] sad_dash     [N]
);

  for (genvar i = 0; i < int'(N); i++) begin : g_pe
    pe #(.PW(PW), .SW(SW)) u_pe (
      .clk, .rst_n, .en, .first, .cur_pix,
      .ref_pix      (ref_pix[i]),
      .fault        (fault[i]),
      .sad_dash     (sad_dash[i]));
  end

endmodule
