// selection_unit: adaptive output selection for a buffered head flit.
//
// Inputs are the route-computation candidates, a per-port flag saying whether an
// output VC (the packet's own class VC or the SVC) can be allocated there, and a
// per-port congestion metric (free downstream credits of the packet's class VC).
// Congested candidates are masked out of the request vector; if two candidates
// remain, the one with more free credits is taken and a tie goes to the X
// dimension (East/West). Output is a one-hot port request, or nothing when every
// candidate is congested. Combinational. Masking congested ports is the
// document's; the credit metric and tie rule are this design's choices.
module selection_unit
  import slide_pkg::*;
(
  input  logic [NPORT-1:0]            cand,
  input  logic [NPORT-1:0]            avail,
  input  logic [NPORT-1:0][CNT_W-1:0] metric,
  output logic [NPORT-1:0]            sel,
  output logic                        valid
);
  logic [NPORT-1:0] ok;
  int               xp, yp;

  always_comb begin
    ok  = cand & avail;
    sel = '0;
    xp  = -1;
    yp  = -1;
    if (ok[P_EAST])  xp = P_EAST;
    if (ok[P_WEST])  xp = P_WEST;
    if (ok[P_NORTH]) yp = P_NORTH;
    if (ok[P_SOUTH]) yp = P_SOUTH;
    if (ok[P_LOCAL]) begin
      sel[P_LOCAL] = 1'b1;
    end else if (xp >= 0 && yp >= 0) begin
      if (metric[yp] > metric[xp]) sel[yp] = 1'b1;
      else                         sel[xp] = 1'b1;
    end else if (xp >= 0) begin
      sel[xp] = 1'b1;
    end else if (yp >= 0) begin
      sel[yp] = 1'b1;
    end
    valid = (sel != '0);
  end
endmodule
