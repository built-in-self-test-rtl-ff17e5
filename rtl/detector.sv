// detector: error detector of the detector-and-selector (DAS) stage.
//
// DC1 selects the output SAD' of one PE. The detector subtracts, in the
// residue domain, the test codes X and Y from SAD'; the results are the
// residues of the error e = SAD' - SAD. A non-zero residue in either modulus
// means the PE output is wrong. Purely combinational.
module detector
  import sad_bist_pkg::*;
#(
  parameter int unsigned N  = NPE,
  parameter int unsigned SW = SAD_W
) (
  input  logic [SW-1:0]        sad_dash [N],  // outputs of all PEs
  input  logic [$clog2(N)-1:0] dc1,           // PE under test
  input  logic [RES_W-1:0]     x_code,        // |SAD| mod phi1 from the TCG
  input  logic [RES_W-1:0]     y_code,        // |SAD| mod phi2 from the TCG
  output logic                 err            // SAD' is in error
);

  logic [SW-1:0]    sel;
  logic [RES_W-1:0] e1, e2;

  always_comb begin
    sel = sad_dash[dc1];
    e1  = mod_sub(16'(sel), x_code, PHI1_A);
    e2  = mod_sub(16'(sel), y_code, PHI2_B);
    err = (e1 != '0) || (e2 != '0);
  end

endmodule
