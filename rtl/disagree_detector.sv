// disagree_detector: exclusive-or disagreement detector.
//
// Forms the bitwise Boolean difference of two corresponding signal vectors of
// subsystems A and B and flags any disagreement. The document places such XOR gates
// at the inputs of the modules and compares the state and output vectors every
// clock cycle; the OR reduction into one flag is this design's choice.
// Interface: a, b are the vectors compared; diff is the bitwise difference and
// err its OR. Purely combinational.
module disagree_detector #(
  parameter int unsigned W = mabmr_pkg::DATA_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] diff,
  output logic         err
);

  always_comb begin
    diff = a ^ b;
    err  = |diff;
  end

endmodule
