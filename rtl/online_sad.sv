// online_sad: on-line sum of absolute differences of two pixel blocks.
//
// N^2 (= NPIX) sd_abs units take one bit of every candidate pixel and of the
// matching reference pixel per cycle, most significant bit first, and turn
// them into digits of |c - r|; an on-line adder tree adds them. The SAD
// leaves as one signed digit per cycle, MSD first.
//
// Timing: after clr, bit PW-1 of every pixel enters in cycle 0, bit 0 in
// cycle PW-1, and zeros must follow. Out of the tree come STEPS =
// PW + 3*log2(NPIX) digits (20 by default) in cycles 0 .. STEPS-1 whose
// value, read MSD first (v = 2v + digit), is the SAD; the first
// 2*log2(NPIX) are zero.
module online_sad
  import sad_bist_pkg::*;
#(
  parameter int unsigned N = NPIX
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clr,
  input  logic      en,
  input  logic      c_bits [N],   // current bit of each candidate pixel
  input  logic      r_bits [N],   // current bit of each reference pixel
  output sd_digit_t z
);

  sd_digit_t absd [N];

  for (genvar i = 0; i < int'(N); i++) begin : g_abs
    sd_abs u_abs (
      .clk, .rst_n, .clr, .en,
      .c_bit(c_bits[i]), .r_bit(r_bits[i]), .z(absd[i]));
  end

  online_adder_tree #(.N_IN(N)) u_tree (
    .clk, .rst_n, .clr, .en, .leaf(absd), .sum(z));

endmodule
