// tcg: test code generator of the BISDC array.
//
// Two coders produce the biresidue code (X, Y) = (|SAD| mod 7, |SAD| mod 15)
// of the block that the PE under test is computing. Input multiplexers pick
// the data: TC1 lets the broadcast current pixel in, TC2 selects which PE's
// reference pixel stream is coded. out_a is X (phi1 = 7), out_b is Y
// (phi2 = 15), as on the coder's schematic.
//
// Timing: as the PE; out_a/out_b are valid after the last pixel of a block.
// tc2 must stay constant during a block.
module tcg
  import sad_bist_pkg::*;
#(
  parameter int unsigned N  = NPE,
  parameter int unsigned PW = PIX_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                tc1,          // take a pixel this cycle
  input  logic                first,
  input  logic [$clog2(N)-1:0] tc2,         // PE whose reference is coded
  input  logic [PW-1:0]       cur_pix,
  input  logic [PW-1:0]       ref_pix [N],
  output logic [RES_W-1:0]    out_a,        // X = |SAD| mod phi1
  output logic [RES_W-1:0]    out_b         // Y = |SAD| mod phi2
);

  logic [PW-1:0] ref_sel;
  assign ref_sel = ref_pix[tc2];

  coder #(.A(PHI1_A), .PW(PW)) u_coder_phi1 (
    .clk, .rst_n, .en(tc1), .first, .cur_pix, .ref_pix(ref_sel), .res(out_a));

  coder #(.A(PHI2_B), .PW(PW)) u_coder_phi2 (
    .clk, .rst_n, .en(tc1), .first, .cur_pix, .ref_pix(ref_sel), .res(out_b));

endmodule
