// min_sad_processor: on-line minimum-SAD search (the "SAD processor").
//
// A host supplies a reference block and, one after another, the candidate
// blocks of a search. For each candidate the processor computes the SAD of
// all N^2 pixel pairs at once in on-line (MSD-first, signed-digit)
// arithmetic and compares it, digit by digit, with SAD_r, the smallest SAD
// found so far in the search. A candidate is abandoned as soon as its digits
// prove its SAD larger than SAD_r; one that finishes with a smaller SAD
// replaces SAD_r and its index becomes the motion vector.
//
// Interface (valid/ready): a candidate is taken in a cycle with cand_valid
// and cand_ready; cand_pix and ref_pix hold its pixels, cand_first starts a
// new search (SAD_r forgotten, candidate index 0), cand_last ends it.
// cand_ready is high only while no candidate is being processed.
// After a candidate: cand_done pulses; cand_early tells it was abandoned,
// else cand_sad holds its full SAD. After the last candidate result_valid
// pulses with min_sad (SAD_r) and mv (index of its candidate, the first one
// on a tie).
//
// Timing: a candidate occupies 1 cycle to load plus up to
// STEPS = PW + 3*log2(N) = 20 cycles of digits; an abandoned one ends in
// the cycle its deciding digit arrives. Outputs are registered.
// The serial pixel feed from parallel registers, the handshake and the
// candidate index as motion vector are this design's choices.
module min_sad_processor
  import sad_bist_pkg::*;
#(
  parameter int unsigned N    = NPIX,    // pixels per block (N^2 of the text)
  parameter int unsigned PW   = PIX_W,
  parameter int unsigned MV_W = 8        // width of the candidate index
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          cand_valid,
  output logic                          cand_ready,
  input  logic                          cand_first,
  input  logic                          cand_last,
  input  logic [PW-1:0]                 cand_pix [N],
  input  logic [PW-1:0]                 ref_pix  [N],
  output logic                          cand_done,
  output logic                          cand_early,
  output logic [PW+$clog2(N)-1:0]       cand_sad,
  output logic                          result_valid,
  output logic [PW+$clog2(N)-1:0]       min_sad,
  output logic [MV_W-1:0]               mv
);

  localparam int unsigned SW    = PW + $clog2(N);
  localparam int unsigned STEPS = PW + 3 * $clog2(N);

  typedef enum logic {S_IDLE, S_RUN} state_t;
  state_t state;

  logic [PW-1:0]   c_sh [N];
  logic [PW-1:0]   r_sh [N];
  logic            c_bits [N];
  logic            r_bits [N];
  logic            last_q;
  logic [MV_W-1:0] idx;
  logic [SW-1:0]   sad_r;
  logic            sad_r_valid;

  logic      accept, clr, run;
  sd_digit_t z;
  logic      stop, last, less;
  logic [SW-1:0] value;

  assign cand_ready = (state == S_IDLE);
  assign accept     = cand_valid && cand_ready;
  assign clr        = accept;
  assign run        = (state == S_RUN);
  assign min_sad    = sad_r;

  for (genvar i = 0; i < int'(N); i++) begin : g_bits
    assign c_bits[i] = c_sh[i][PW-1];
    assign r_bits[i] = r_sh[i][PW-1];
  end

  online_sad #(.N(N)) u_sad (
    .clk, .rst_n, .clr, .en(run), .c_bits, .r_bits, .z);

  online_comparator #(.DIGITS(STEPS), .SW(SW)) u_cmp (
    .clk, .rst_n, .clr, .en(run), .z, .sad_r, .sad_r_valid,
    .stop, .last, .value, .less);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      last_q       <= 1'b0;
      idx          <= '0;
      sad_r        <= '0;
      sad_r_valid  <= 1'b0;
      mv           <= '0;
      cand_done    <= 1'b0;
      cand_early   <= 1'b0;
      cand_sad     <= '0;
      result_valid <= 1'b0;
      for (int i = 0; i < int'(N); i++) begin
        c_sh[i] <= '0;
        r_sh[i] <= '0;
      end
    end else begin
      cand_done    <= 1'b0;
      cand_early   <= 1'b0;
      result_valid <= 1'b0;
      if (accept) begin
        state  <= S_RUN;
        last_q <= cand_last;
        for (int i = 0; i < int'(N); i++) begin
          c_sh[i] <= cand_pix[i];
          r_sh[i] <= ref_pix[i];
        end
        if (cand_first) begin
          idx         <= '0;
          sad_r_valid <= 1'b0;
        end else begin
          idx <= idx + 1'b1;
        end
      end else if (run) begin
        for (int i = 0; i < int'(N); i++) begin
          c_sh[i] <= c_sh[i] << 1;
          r_sh[i] <= r_sh[i] << 1;
        end
        if (stop || last) begin
          state      <= S_IDLE;
          cand_done  <= 1'b1;
          cand_early <= stop;
          if (!stop) cand_sad <= value;
          if (!stop && less) begin
            sad_r       <= value;
            sad_r_valid <= 1'b1;
            mv          <= idx;
          end
          result_valid <= last_q;
        end
      end
    end
  end

endmodule
