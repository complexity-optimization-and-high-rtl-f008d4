// dist_check: multiplier-free test of whether two neurons are close.
//
// Neuron positions are given in a two-axis coordinate system whose reference
// points lie far outside the electrode array, so that for distances of the
// order of the critical radius R at least one axis difference approximates
// the true distance and the other does not exceed it. Two neurons are
// treated as close (same spike region) when both |XA-XB| < R and
// |YA-YB| < R; otherwise they are distant. This follows the source design.
// Purely combinational.
module dist_check
  import botm_pkg::*;
(
  input  logic [XY_W-1:0] xa,
  input  logic [XY_W-1:0] ya,
  input  logic [XY_W-1:0] xb,
  input  logic [XY_W-1:0] yb,
  input  logic [XY_W-1:0] r,
  output logic            close
);
  logic [XY_W-1:0] dx, dy;
  always_comb begin
    dx    = (xa >= xb) ? xa - xb : xb - xa;
    dy    = (ya >= yb) ? ya - yb : yb - ya;
    close = (dx < r) && (dy < r);
  end
endmodule
