// corrector: second half of the syndrome analysis and corrector (SAC).
//
// A look-up table maps the syndrome pair to the erroneous bit of the 12-bit
// SAD, and 12 multiplexers pass each bit straight or inverted. A bit k that
// went 0 -> 1 gives e = +2^k and the syndrome (2^k mod 7, 2^k mod 15); one
// that went 1 -> 0 gives e = -2^k and the negated residues. The 24 entries
// are all distinct, so the table holds one entry per bit and sign; it is
// computed at elaboration from these formulas.
//
// The flags are this design's additions: corrected when one table entry
// matched (and the bit's present value agrees with the sign of e),
// uncorrectable when the syndrome is non-zero but matches no entry (more
// than one erroneous bit). A zero syndrome passes the data unchanged.
// Purely combinational.
module corrector
  import sad_bist_pkg::*;
#(
  parameter int unsigned SW = SAD_W
) (
  input  logic [SW-1:0]    select_out,
  input  logic [RES_W-1:0] s_phi_1,
  input  logic [RES_W-1:0] s_phi_2,
  output logic [SW-1:0]    cor_out,
  output logic             corrected,
  output logic             uncorrectable
);

  typedef logic [RES_W-1:0] res_tab_t [SW];

  // residue of +2^k (neg = 0) or -2^k (neg = 1) modulo 2^a - 1
  function automatic res_tab_t make_tab(input int unsigned a, input bit neg);
    res_tab_t t;
    logic [15:0] m;
    logic [RES_W-1:0] r;
    m = (16'd1 << a) - 16'd1;
    for (int k = 0; k < int'(SW); k++) begin
      r = mod_mersenne(16'd1 << k, a);
      t[k] = neg ? mod_mersenne(m - 16'(r), a) : r;
    end
    return t;
  endfunction

  localparam res_tab_t POS1 = make_tab(PHI1_A, 1'b0);
  localparam res_tab_t POS2 = make_tab(PHI2_B, 1'b0);
  localparam res_tab_t NEG1 = make_tab(PHI1_A, 1'b1);
  localparam res_tab_t NEG2 = make_tab(PHI2_B, 1'b1);

  logic [SW-1:0] flip;   // LUT output: one-hot erroneous bit

  always_comb begin
    for (int k = 0; k < int'(SW); k++) begin
      flip[k] = ( select_out[k] && s_phi_1 == POS1[k] && s_phi_2 == POS2[k]) ||
                (!select_out[k] && s_phi_1 == NEG1[k] && s_phi_2 == NEG2[k]);
      cor_out[k] = flip[k] ? !select_out[k] : select_out[k];   // 12 muxes
    end
    corrected     = |flip;
    uncorrectable = ((s_phi_1 != '0) || (s_phi_2 != '0)) && !(|flip);
  end

endmodule
