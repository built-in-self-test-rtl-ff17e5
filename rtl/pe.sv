// pe: processing element of the motion-estimation computing array.
//
// Computes the sum of absolute differences (SAD) of one 4x4 block, one pixel
// pair per cycle. An 8-bit adder forms |cur - ref| (a 9-bit subtraction and a
// conditional negation) and a 12-bit adder adds it to the accumulator. The
// first pixel of a block (first = 1) loads the accumulator instead of adding,
// so blocks follow each other without a gap.
//
// Fault injection: while fault.create_error is high, one line is held at
// fault.stuck_val (a single stuck-at fault). The line is either bit
// fault.line of the SAD output bus, which gives a single-bit SAD error when
// the bit had the other value, or bit fault.line of the |cur - ref| bus,
// which is accumulated over the block and usually gives a multi-bit error.
// The stuck-at model follows the document; the choice of sites and their
// selection are this design's own, the document only shows a create_error
// input.
//
// Timing: the accumulator is updated on the rising clock edge in which
// en = 1; sad_dash holds the full block SAD from the edge that takes the 16th
// pixel until the edge that takes the first pixel of the next block.
// Reset (rst_n low, asynchronous) clears the accumulator.
module pe
  import sad_bist_pkg::*;
#(
  parameter int unsigned PW = PIX_W,   // pixel width
  parameter int unsigned SW = SAD_W    // accumulator / SAD width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,            // a pixel pair is present
  input  logic          first,         // it is the first pair of a block
  input  logic [PW-1:0] cur_pix,
  input  logic [PW-1:0] ref_pix,
  input  pe_fault_t     fault,         // fault-injection controls
  output logic [SW-1:0] sad_dash       // SAD' (possibly faulty) block SAD
);

  logic [PW:0]   diff;      // 8-bit adder: cur - ref with borrow
  logic [PW-1:0] absd;
  logic [SW-1:0] acc;
  logic [SW-1:0] sum;       // 12-bit adder

  always_comb begin
    diff = {1'b0, cur_pix} - {1'b0, ref_pix};
    absd = diff[PW] ? PW'(-diff[PW-1:0]) : diff[PW-1:0];
    if (fault.create_error && fault.site == FAULT_ABSDIFF && (32'(fault.line) < PW))
      absd[fault.line[$clog2(PW)-1:0]] = fault.stuck_val;
    sum  = (first ? '0 : acc) + SW'(absd);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= sum;
  end

  always_comb begin
    sad_dash = acc;
    if (fault.create_error && fault.site == FAULT_SAD_BUS && (32'(fault.line) < SW))
      sad_dash[fault.line] = fault.stuck_val;
  end

endmodule
