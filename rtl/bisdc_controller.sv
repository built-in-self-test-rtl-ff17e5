// bisdc_controller: sequencing of the BISDC array.
//
// Counts the pixel pairs of each block (BLK per block) and, for every block,
// names one PE to be tested. The PE under test advances round robin, one PE
// per block, so every PE is checked once every N blocks. Control lines:
//   tc1 : the TCG takes the current pixel (follows pix_valid)
//   tc2 : PE whose reference stream the TCG codes (block being accumulated)
//   dc1 : PE checked by the detector (block just completed)
//   sc1 : PE taken by the selector (same as dc1)
//   sc2 : the block just completed is checked and delivered this cycle
// first marks the first pair of a block for the PEs and the TCG.
//
// Timing: sc2 (= eval) is high in the cycle after the edge that took the
// last pair of a block; dc1/sc1 then name the PE that was coded during that
// block, while tc2 already names the PE of the next block, so blocks can
// stream back to back. The document names the controller and its lines;
// the round-robin order and the timing are this design's choice.
module bisdc_controller
  import sad_bist_pkg::*;
#(
  parameter int unsigned N   = NPE,
  parameter int unsigned BLK = NPIX
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pix_valid,
  output logic                 first,
  output logic                 eval,
  output bisdc_ctrl_t          ctrl
);

  logic [$clog2(BLK)-1:0] cnt;
  logic [$clog2(N)-1:0]   acc_idx;
  logic [$clog2(N)-1:0]   eval_idx;
  logic                   eval_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      acc_idx  <= '0;
      eval_idx <= '0;
      eval_q   <= 1'b0;
    end else begin
      eval_q <= 1'b0;
      if (pix_valid) begin
        if (32'(cnt) == BLK - 1) begin
          cnt      <= '0;
          eval_q   <= 1'b1;
          eval_idx <= acc_idx;
          acc_idx  <= (32'(acc_idx) == N - 1) ? '0 : acc_idx + 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  always_comb begin
    first    = (cnt == '0);
    eval     = eval_q;
    ctrl     = '0;
    ctrl.tc1 = pix_valid;
    ctrl.tc2 = PE_IDX_W'(acc_idx);
    ctrl.dc1 = PE_IDX_W'(eval_idx);
    ctrl.sc1 = PE_IDX_W'(eval_idx);
    ctrl.sc2 = eval_q;
  end

endmodule
