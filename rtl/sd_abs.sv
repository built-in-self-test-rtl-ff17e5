// sd_abs: on-line absolute difference of two pixels, MSD first.
//
// Each cycle takes one bit of the candidate pixel c and the same bit of the
// reference pixel r, most significant bit first. The pair (r bit, c bit) is
// already the radix-2 signed digit of d = c - r (first bit negatively
// weighted, second positively), so the conversion costs nothing. The sign of
// d is that of its first non-zero digit: while digits are zero ("00" or
// "11") they pass unchanged; if the first non-zero digit is "01" it and all
// later digits pass unchanged; if it is "10" it and all later digits leave
// with their two bits swapped, which negates them. No on-line delay: the
// output digit belongs to the same cycle as the input bits.
//
// clr (synchronous) forgets the sign before a new number; the next digit is
// then the most significant one. Asynchronous active-low reset does the same.
module sd_abs
  import sad_bist_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clr,
  input  logic      en,       // a digit is present
  input  logic      c_bit,
  input  logic      r_bit,
  output sd_digit_t z         // digit of |c - r|
);

  logic      sign_known, negative;
  sd_digit_t d;
  logic      swap;

  always_comb begin
    d.neg = r_bit;
    d.pos = c_bit;
    // negate from the first "10" onwards
    swap  = sign_known ? negative : (d.neg && !d.pos);
    z.neg = swap ? d.pos : d.neg;
    z.pos = swap ? d.neg : d.pos;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sign_known <= 1'b0;
      negative   <= 1'b0;
    end else if (clr) begin
      sign_known <= 1'b0;
      negative   <= 1'b0;
    end else if (en && !sign_known && (d.neg != d.pos)) begin
      sign_known <= 1'b1;
      negative   <= d.neg;
    end
  end

endmodule
