// coder: one residue coder of the test code generator (TCG).
//
// Produces |SAD| mod (2^A - 1) of a block directly from the pixel stream,
// without the PE's SAD: each pixel's |cur - ref| is reduced modulo 2^A - 1
// and the reduced values are added modulo 2^A - 1 (the residue of a sum is
// the residue of the sum of residues). Reduction is by end-around-carry
// folding. Two of these, with A = 3 and A = 4, form the biresidue code.
//
// Interface and timing match the PE: en takes a pixel pair on the rising
// edge, first restarts the accumulation, and res holds the residue of the
// whole block after the 16th pair. Asynchronous active-low reset clears it.
// The document gives the coder's function and its two moduli conditions;
// the serial accumulation is this design's choice.
module coder
  import sad_bist_pkg::*;
#(
  parameter int unsigned A  = PHI1_A,  // modulus is 2^A - 1
  parameter int unsigned PW = PIX_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             first,
  input  logic [PW-1:0]    cur_pix,
  input  logic [PW-1:0]    ref_pix,
  output logic [RES_W-1:0] res
);

  logic [RES_W-1:0] pix_res;
  logic [RES_W-1:0] nxt;

  always_comb begin
    pix_res = mod_mersenne(16'(abs_diff(cur_pix, ref_pix)), A);
    nxt     = mod_mersenne(16'(first ? '0 : res) + 16'(pix_res), A);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  res <= '0;
    else if (en) res <= nxt;
  end

endmodule
