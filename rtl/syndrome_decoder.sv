// syndrome_decoder: first half of the syndrome analysis and corrector (SAC).
//
// Forms the syndromes (S_phi1, S_phi2) = (|N - X| mod 7, |N - Y| mod 15) of
// the selected PE output N against the test codes X and Y. They equal the
// residues of the error e = N - SAD, which the corrector's table turns into
// a bit position. Purely combinational.
module syndrome_decoder
  import sad_bist_pkg::*;
#(
  parameter int unsigned SW = SAD_W
) (
  input  logic [SW-1:0]    select_out,
  input  logic [RES_W-1:0] x_code,
  input  logic [RES_W-1:0] y_code,
  output logic [RES_W-1:0] s_phi_1,
  output logic [RES_W-1:0] s_phi_2
);

  assign s_phi_1 = mod_sub(16'(select_out), x_code, PHI1_A);
  assign s_phi_2 = mod_sub(16'(select_out), y_code, PHI2_B);

endmodule
