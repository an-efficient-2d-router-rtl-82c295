// route_compute: minimal, fully adaptive route computation (RC).
//
// For a head flit it returns a 5-bit mask of productive output ports: at most one
// in X (East or West) and one in Y (North or South), or only the ejection port
// when the in-layer target is this router. The in-layer target is the packet's
// destination when it is on this layer, otherwise the vertical hub (3D router)
// named in the header. Purely combinational; the router evaluates it on the
// arriving flit so that RC overlaps the buffer write. Minimal adaptive routing is
// the document's; taking the hub from the header is this design's choice, as the
// document does not say how the proposed router picks the 3D router.
module route_compute
  import slide_pkg::*;
(
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  logic [COORD_W-1:0] my_z,
  input  hdr_t               hdr,
  output logic [NPORT-1:0]   cand
);
  logic [COORD_W-1:0] tx, ty;

  always_comb begin
    if (hdr.dst_z == my_z) begin
      tx = hdr.dst_x;
      ty = hdr.dst_y;
    end else begin
      tx = hdr.hub_x;
      ty = hdr.hub_y;
    end
    cand = '0;
    if (tx > my_x) cand[P_EAST]  = 1'b1;
    if (tx < my_x) cand[P_WEST]  = 1'b1;
    if (ty > my_y) cand[P_NORTH] = 1'b1;
    if (ty < my_y) cand[P_SOUTH] = 1'b1;
    if (tx == my_x && ty == my_y) cand[P_LOCAL] = 1'b1;
  end
endmodule
