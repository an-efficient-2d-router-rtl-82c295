// tb_route_compute: exhaustive check over every router position on one layer,
// every destination in a 4x4x4 mesh and every hub position: the candidate mask
// must hold exactly the productive directions towards the in-layer target.
`timescale 1ns/1ps
module tb_route_compute;
  import slide_pkg::*;
  logic [COORD_W-1:0] my_x, my_y, my_z;
  hdr_t hdr;
  logic [NPORT-1:0] cand;
  int checks = 0, failures = 0;

  route_compute dut (.my_x, .my_y, .my_z, .hdr, .cand);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    my_z = 2'd1;
    for (int mx = 0; mx < 4; mx++) for (int my = 0; my < 4; my++)
    for (int dx = 0; dx < 4; dx++) for (int dy = 0; dy < 4; dy++) for (int dz = 0; dz < 4; dz++) begin
      int hx, hy, tx, ty;
      logic [NPORT-1:0] e;
      hx = $urandom_range(0, 3); hy = $urandom_range(0, 3);
      my_x = 2'(mx); my_y = 2'(my);
      hdr = '{hub_x: 2'(hx), hub_y: 2'(hy), dst_x: 2'(dx), dst_y: 2'(dy), dst_z: 2'(dz)};
      #1;
      tx = (dz == 1) ? dx : hx;
      ty = (dz == 1) ? dy : hy;
      e = '0;
      e[P_EAST]  = tx > mx;
      e[P_WEST]  = tx < mx;
      e[P_NORTH] = ty > my;
      e[P_SOUTH] = ty < my;
      e[P_LOCAL] = (tx == mx) && (ty == my);
      checks++;
      if (cand !== e) begin
        failures++;
        $display("FAIL at (%0d,%0d) dst (%0d,%0d,%0d) hub (%0d,%0d): %b vs %b", mx, my, dx, dy, dz, hx, hy, cand, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
