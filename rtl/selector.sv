// selector: data selector of the detector-and-selector (DAS) stage.
//
// SC1 picks the output of one PE. When SC2 enables delivery, the value goes
// out on the error-free path if the detector found nothing, or to the
// syndrome analysis and corrector (SAC) if it found an error. select_out
// carries the selected value in both cases; the two valid lines tell where
// it belongs. Purely combinational.
module selector
  import sad_bist_pkg::*;
#(
  parameter int unsigned N  = NPE,
  parameter int unsigned SW = SAD_W
) (
  input  logic [SW-1:0]        sad_dash [N],
  input  logic [$clog2(N)-1:0] sc1,
  input  logic                 sc2,
  input  logic                 det_err,     // from the detector
  output logic [SW-1:0]        select_out,
  output logic                 free_valid,  // select_out is error free
  output logic                 sac_valid    // select_out needs correction
);

  always_comb begin
    select_out = sad_dash[sc1];
    free_valid = sc2 && !det_err;
    sac_valid  = sc2 && det_err;
  end

endmodule
