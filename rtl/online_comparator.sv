// online_comparator: compares an MSD-first signed-digit SAD with the best
// SAD so far (SAD_r) while its digits arrive.
//
// The running value v (v = 2v + digit) is the number formed by the digits
// received. With rem digits still to come, each in {-1, 0, 1}, the final
// value is at least v*2^rem - (2^rem - 1). As soon as that bound exceeds
// SAD_r the candidate cannot win and stop rises, so the search can drop it
// early. When the last digit arrives, last rises and value is the exact SAD;
// less tells whether it is below SAD_r (always true while SAD_r is not
// valid). The document takes its comparator from elsewhere and gives only
// this function; the bound test is this design's own way to provide it.
//
// Timing: stop, last, value and less are combinational on the digit of the
// current cycle (en high); clr (synchronous) starts a new SAD; the digit
// count restarts with it.
module online_comparator
  import sad_bist_pkg::*;
#(
  parameter int unsigned DIGITS = 20,       // digits per SAD
  parameter int unsigned SW     = SAD_W     // width of SAD_r and of the SAD
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  sd_digit_t     z,
  input  logic [SW-1:0] sad_r,
  input  logic          sad_r_valid,
  output logic          stop,
  output logic          last,
  output logic [SW-1:0] value,
  output logic          less
);

  localparam int unsigned VW = DIGITS + 2;

  logic signed [VW-1:0]  v, v_next, lower, ones;
  logic [$clog2(DIGITS)-1:0] cnt;
  logic [$clog2(DIGITS):0]   rem;

  always_comb begin
    v_next = (v <<< 1) + VW'(signed'({1'b0, z.pos})) - VW'(signed'({1'b0, z.neg}));
    rem    = ($clog2(DIGITS)+1)'(DIGITS - 1) - ($clog2(DIGITS)+1)'(cnt);
    ones   = (VW'(1) <<< rem) - VW'(1);
    lower  = (v_next <<< rem) - ones;
    stop   = en && sad_r_valid && (lower > signed'(VW'(sad_r)));
    last   = en && (32'(cnt) == DIGITS - 1);
    value  = SW'(v_next);
    less   = !sad_r_valid || (v_next < signed'(VW'(sad_r)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0; cnt <= '0;
    end else if (clr) begin
      v <= '0; cnt <= '0;
    end else if (en) begin
      v   <= v_next;
      cnt <= cnt + 1'b1;
    end
  end

endmodule
