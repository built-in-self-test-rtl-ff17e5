// online_adder_tree: binary tree of on-line adders, MSD first.
//
// Sums N_IN signed-digit streams (N_IN a power of two) with log2(N_IN)
// levels of online_adder. All leaves must start in the same cycle after
// clr. Each level adds one leading digit and two cycles, so the sum of N_IN
// streams of n digits is a stream of n + 3*log2(N_IN) digits: 2*log2(N_IN)
// leading zeros, then the n + log2(N_IN) digits of the sum, the least
// significant leaving 3*log2(N_IN) cycles after the least significant input
// digit. Inputs must be held at zero after their last digit until then.
module online_adder_tree
  import sad_bist_pkg::*;
#(
  parameter int unsigned N_IN = NPIX
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clr,
  input  logic      en,
  input  sd_digit_t leaf [N_IN],
  output sd_digit_t sum
);

  localparam int unsigned LEVELS = $clog2(N_IN);

  // g_lvl[l].d[i]: i-th stream at level l (level 0 = leaves)
  for (genvar l = 0; l <= int'(LEVELS); l++) begin : g_lvl
    sd_digit_t d [N_IN >> l];
    if (l == 0) begin : g_leaves
      for (genvar i = 0; i < int'(N_IN); i++) begin : g_leaf
        assign d[i] = leaf[i];
      end
    end else begin : g_adders
      for (genvar i = 0; i < int'(N_IN >> l); i++) begin : g_add
        online_adder u_add (
          .clk, .rst_n, .clr, .en,
          .x(g_lvl[l-1].d[2*i]), .y(g_lvl[l-1].d[2*i+1]), .z(d[i]));
      end
    end
  end

  assign sum = g_lvl[LEVELS].d[0];

endmodule
