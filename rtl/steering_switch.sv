// steering_switch: the S.P.D.T. steering network of one module level.
//
// Level k holds physical module k (home subsystem A) and module k-bar (home B).
// swap interchanges them: module k then takes subsystem B's input and drives B's
// output and state, and k-bar serves A. iso_a (iso_b) takes module k (k-bar) out of
// service: its counterpart's output and state are sent to both subsystems, and swap
// is ignored at that level. Interchange for testing and isolation after diagnosis
// follow the document; encoding them as three control bits is this design's choice.
//
// Interface: x_a/x_b are the logical inputs of subsystems A and B at this level,
// xp_a/xp_b the inputs of the two physical modules; yp_*/sp_* the physical outputs
// and states, y_*/s_* the logical ones. Purely combinational.
module steering_switch #(
  parameter int unsigned W = mabmr_pkg::DATA_W
) (
  input  logic         swap,
  input  logic         iso_a,
  input  logic         iso_b,
  input  logic [W-1:0] x_a,
  input  logic [W-1:0] x_b,
  output logic [W-1:0] xp_a,
  output logic [W-1:0] xp_b,
  input  logic [W-1:0] yp_a,
  input  logic [W-1:0] yp_b,
  input  logic [W-1:0] sp_a,
  input  logic [W-1:0] sp_b,
  output logic [W-1:0] y_a,
  output logic [W-1:0] y_b,
  output logic [W-1:0] s_a,
  output logic [W-1:0] s_b
);

  logic sw;

  always_comb begin
    sw = swap & ~iso_a & ~iso_b;
    // input side: each physical module listens to the subsystem it serves
    xp_a = sw ? x_b : x_a;
    xp_b = sw ? x_a : x_b;
    // output side
    if (iso_a) begin
      y_a = yp_b;  y_b = yp_b;  s_a = sp_b;  s_b = sp_b;
    end else if (iso_b) begin
      y_a = yp_a;  y_b = yp_a;  s_a = sp_a;  s_b = sp_a;
    end else if (sw) begin
      y_a = yp_b;  y_b = yp_a;  s_a = sp_b;  s_b = sp_a;
    end else begin
      y_a = yp_a;  y_b = yp_b;  s_a = sp_a;  s_b = sp_b;
    end
  end

endmodule
