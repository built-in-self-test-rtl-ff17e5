// multibit_checker: multi-bit error detection for the BISDC array by
// recomputing a PE's SAD with the on-line (signed-digit) adder tree and
// comparing it with the PE's own result.
//
// The biresidue check locates single-bit errors but can miss or miscorrect
// multi-bit ones. This checker captures the 16 pixel pairs that the PE under
// test receives in one block (the same current pixel and selected reference
// pixel that feed the test code generator), recomputes their SAD with an
// independent adder (online_sad: 16 on-line absolute-difference units and an
// on-line adder tree) and compares the result with the PE's SAD'. Any
// difference, whatever the number of wrong bits, raises mb_err.
//
// Scheduling: while idle, the checker captures the next block that starts.
// When that block's check strobe (eval) comes, it latches the PE's SAD' and
// its index, then spends 1 + STEPS (= 21 by default) cycles computing; blocks
// that start meanwhile are not captured. With blocks back to back this checks
// every third block, and since the PE under test advances by one per block,
// every PE is still reached. mb_valid pulses for one cycle with mb_pe,
// mb_sad (the recomputed SAD) and mb_err. When mb_err is high, mb_sad is
// the corrected value of that PE's result.
//
// The comparison of the on-line adder's result with the PE result follows
// the source description of this multi-bit detection; buffering, scheduling
// and timing are this design's own.
module multibit_checker
  import sad_bist_pkg::*;
#(
  parameter int unsigned N   = NPE,
  parameter int unsigned BLK = NPIX,
  parameter int unsigned PW  = PIX_W,
  parameter int unsigned SW  = SAD_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pix_valid,   // a pixel pair is present
  input  logic                 first,       // it is the first of a block
  input  logic [PW-1:0]        cur_pix,
  input  logic [PW-1:0]        ref_sel,     // reference pixel of the PE under test
  input  logic                 eval,        // block just completed is checked now
  input  logic [$clog2(N)-1:0] eval_pe,     // its PE
  input  logic [SW-1:0]        pe_sad,      // that PE's SAD' (valid with eval)
  output logic                 mb_valid,
  output logic [$clog2(N)-1:0] mb_pe,
  output logic [SW-1:0]        mb_sad,
  output logic                 mb_err
);

  localparam int unsigned STEPS = PW + 3 * $clog2(BLK);

  typedef enum logic [1:0] {M_IDLE, M_CAPTURE, M_WAIT, M_RUN} mstate_t;
  mstate_t state;

  logic [PW-1:0]          c_buf [BLK];
  logic [PW-1:0]          r_buf [BLK];
  logic [$clog2(BLK)-1:0] wr;
  logic [SW-1:0]          sad_q;
  logic                   c_bits [BLK];
  logic                   r_bits [BLK];
  logic                   load, run;
  sd_digit_t              z;
  logic                   cmp_stop, cmp_last, cmp_less;
  logic [SW-1:0]          value;

  assign load = (state == M_WAIT) && eval;
  assign run  = (state == M_RUN);

  for (genvar i = 0; i < int'(BLK); i++) begin : g_bits
    assign c_bits[i] = c_buf[i][PW-1];
    assign r_bits[i] = r_buf[i][PW-1];
  end

  online_sad #(.N(BLK)) u_sad (
    .clk, .rst_n, .clr(load), .en(run), .c_bits, .r_bits, .z);

  // used only to convert the digit stream to binary (SAD_r not valid)
  online_comparator #(.DIGITS(STEPS), .SW(SW)) u_conv (
    .clk, .rst_n, .clr(load), .en(run), .z, .sad_r('0), .sad_r_valid(1'b0),
    .stop(cmp_stop), .last(cmp_last), .value, .less(cmp_less));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= M_IDLE;
      wr       <= '0;
      sad_q    <= '0;
      mb_valid <= 1'b0;
      mb_pe    <= '0;
      mb_sad   <= '0;
      mb_err   <= 1'b0;
      for (int i = 0; i < int'(BLK); i++) begin
        c_buf[i] <= '0;
        r_buf[i] <= '0;
      end
    end else begin
      mb_valid <= 1'b0;
      unique case (state)
        M_IDLE, M_CAPTURE: begin
          if (pix_valid && (state == M_CAPTURE || first)) begin
            c_buf[wr] <= cur_pix;
            r_buf[wr] <= ref_sel;
            wr        <= wr + 1'b1;
            state     <= (32'(wr) == BLK - 1) ? M_WAIT : M_CAPTURE;
          end
        end
        M_WAIT: begin
          if (eval) begin
            sad_q <= pe_sad;
            mb_pe <= eval_pe;
            state <= M_RUN;
          end
        end
        M_RUN: begin
          for (int i = 0; i < int'(BLK); i++) begin
            c_buf[i] <= c_buf[i] << 1;
            r_buf[i] <= r_buf[i] << 1;
          end
          if (cmp_last) begin
            mb_valid <= 1'b1;
            mb_sad   <= value;
            mb_err   <= (value != sad_q);
            wr       <= '0;
            state    <= M_IDLE;
          end
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  // the buffer is complete when the check strobe of its block arrives
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == M_CAPTURE) |-> !eval);

endmodule
