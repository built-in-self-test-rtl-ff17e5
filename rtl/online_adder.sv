// online_adder: radix-2 signed-digit on-line adder, MSD first.
//
// Adds two digit streams x and y (digit = pos - neg) with an on-line delay
// of 3, using two levels of full adders and no carry chain:
//   level 1, per position: x.pos + y.pos - x.neg = 2*c1 - n1
//            (a full adder with x.neg inverted at its input; n1 is the
//            inverted sum, a negatively weighted bit),
//   level 2, per position: c1(from the next lower position) - n1 - y.neg
//            = p2 - 2*m2 (a full adder with both negative bits inverted at
//            its inputs and the carry inverted at its output).
// The digit of a position is (neg = m2 of the next lower position, pos = p2
// of that position). Registers hold n1 and y.neg for one cycle (the level-2
// cell of a position waits for the carry of the position below), p2 for one
// more, and the output digit is registered, as in the document's adder
// figure (inputs x_{j+3}, y_{j+3} in the cycle in which z_j leaves).
//
// Timing: after clr, input digit k (k = 1..n, weight 2^(n-k)) enters in
// cycle k-1; output digit j (j = 0..n, one extra leading digit) leaves in
// cycle j+2, and the output of cycles 0 and 1 is zero. Feed zero digits for
// three cycles after the last input digit. Each adder therefore adds one
// leading digit and two cycles to a stream.
module online_adder
  import sad_bist_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clr,   // synchronous: start a new addition
  input  logic      en,    // advance one digit
  input  sd_digit_t x,
  input  sd_digit_t y,
  output sd_digit_t z
);

  logic c1, n1;          // level 1 carry (positive) and sum (negative)
  logic p2, m2;          // level 2 sum (positive) and carry (negative)
  logic n1_d, yneg_d, p2_d;
  sd_digit_t z_q;
  logic a1, a2, a3;

  always_comb begin
    // level 1: full adder on (x.pos, ~x.neg, y.pos)
    a1 = x.pos; a2 = !x.neg; a3 = y.pos;
    c1 = (a1 & a2) | (a1 & a3) | (a2 & a3);
    n1 = !(a1 ^ a2 ^ a3);
    // level 2: full adder on (c1, ~n1_d, ~yneg_d), carry inverted
    p2 = c1 ^ !n1_d ^ !yneg_d;
    m2 = !((c1 & !n1_d) | (c1 & !yneg_d) | (!n1_d & !yneg_d));
  end

  assign z = z_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n1_d <= 1'b0; yneg_d <= 1'b0; p2_d <= 1'b0; z_q <= '0;
    end else if (clr) begin
      n1_d <= 1'b0; yneg_d <= 1'b0; p2_d <= 1'b0; z_q <= '0;
    end else if (en) begin
      n1_d <= n1; yneg_d <= y.neg; p2_d <= p2;
      z_q.pos <= p2_d;
      z_q.neg <= m2;
    end
  end

endmodule
