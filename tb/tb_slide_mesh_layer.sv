// tb_slide_mesh_layer: end-to-end test of a 4x4 layer of SlideAcross routers at
// default parameters.
//
// Part 1 replays the worked example of the design: a packet injected at (0,0)
// for another layer whose vertical hub is at (3,2). In an empty layer it leaves
// East tagged SVC, bypasses (1,0) and (2,0) in one cycle each, is buffered at
// (3,0) to turn North, bypasses (3,1) and is ejected at the hub (3,2). The head
// latency from local injection at (0,0) to ejection must be 3 (source) + 1 + 1 +
// 3 (turn) + 1 + 3 (eject) = 12 cycles, and the three bypass events must be seen
// at the expected nodes. The same trip with the North-first choice forced by
// congestion is not checked; part 2 covers adaptivity.
// Part 2 is uniform random traffic from all 16 nodes, a mix of in-layer and
// other-layer destinations. A scoreboard checks that each packet is ejected at its
// in-layer target, complete, in order, with its class VC and payload. Bypass
// hops, buffered hops, SVC tags, adaptive (non-XY) choices, credit stalls and
// ejections are counted; each must occur.
// Part 3 is inter-layer traffic of an inhomogeneous layer with one 3D router in
// four nodes: each source sends most packets to its nearest hub, with the same
// delivery checks; its average latency is printed.
`timescale 1ns/1ps
module tb_slide_mesh_layer;
  import slide_pkg::*;
  localparam int NN = MESH_X * MESH_Y;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  [NN-1:0]            pkt_valid, pkt_ready, ej_valid;
  hdr_t  [NN-1:0]            pkt_hdr;
  logic  [NN-1:0][31:0]      pkt_id;
  flit_t [NN-1:0]            ej_flit;
  logic  [NN-1:0][NPORT-1:0] byp_event;

  slide_mesh_layer dut (
    .clk, .rst_n, .pkt_valid, .pkt_ready, .pkt_hdr, .pkt_id, .ej_valid, .ej_flit, .byp_event
  );

  int checks = 0, failures = 0, cyc = 0;

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  typedef struct {
    int  node;      // expected ejection node
    int  got;
    int  inj_cyc;   // head entered the source router
    int  ej_cyc;    // head ejected
    int  done_cyc;
  } rec_t;
  rec_t sb [int];
  int n_sent = 0, n_done = 0;
  longint lat_sum = 0;
  int n_byp = 0, n_ej = 0, n_tag = 0, n_adapt = 0, n_stall = 0, n_buf = 0;

  // head injection time, seen on the router's local input
  always @(posedge clk) begin
    cyc = cyc + 1;
    if (rst_n) begin
      for (int n = 0; n < NN; n++) begin
        for (int o = 0; o < NPORT; o++) if (byp_event[n][o]) n_byp++;
        if (ej_valid[n]) begin
          flit_t f;
          int id, idx;
          f = ej_flit[n];
          id = int'(f.data[63:32]);
          idx = int'(f.data[71:64]);
          n_ej++;
          if (!sb.exists(id)) chk(0, $sformatf("unknown packet %0d", id));
          else begin
            chk(sb[id].node == n, $sformatf("pkt %0d ejected at node %0d, expected %0d", id, n, sb[id].node));
            chk(idx == sb[id].got, $sformatf("pkt %0d in order", id));
            chk(f.svc == 1'b0, "no SVC tag on ejection");
            if (idx == 0) sb[id].ej_cyc = cyc;
            sb[id].got++;
            if (sb[id].got == 5) begin
              n_done++;
              sb[id].done_cyc = cyc;
              lat_sum += cyc - sb[id].inj_cyc;
            end
          end
        end
      end
    end
  end

  // observe the routers' internals for the mechanism counts
  for (genvar n = 0; n < NN; n++) begin : g_obs
    always @(posedge clk) begin
      if (rst_n) begin
        automatic int y = n / MESH_X;
        automatic int x = n % MESH_X;
        if (dut.g_y[n / MESH_X].g_x[n % MESH_X].u_ni.flit_valid &&
            is_head(dut.g_y[n / MESH_X].g_x[n % MESH_X].u_ni.flit.ftype)) begin
          automatic int id = int'(dut.g_y[n / MESH_X].g_x[n % MESH_X].u_ni.flit.data[63:32]);
          if (sb.exists(id)) sb[id].inj_cyc = cyc;
        end
        for (int p = 0; p < NPORT; p++) begin
          for (int l = 0; l < NLANE; l++) begin
            if (dut.g_y[n / MESH_X].g_x[n % MESH_X].u_router.f_wr[p][l]) n_buf++;
            if (!dut.g_y[n / MESH_X].g_x[n % MESH_X].u_router.f_empty[p][l] &&
                !dut.g_y[n / MESH_X].g_x[n % MESH_X].u_router.lane_ready[p][l]) n_stall++;
          end
        end
        for (int o = 1; o < NPORT; o++)
          if (dut.g_y[n / MESH_X].g_x[n % MESH_X].u_router.tag[o] &&
              dut.g_y[n / MESH_X].g_x[n % MESH_X].u_router.o_valid[o]) n_tag++;
        for (int p = 0; p < NPORT; p++)
          for (int l = 0; l < NLANE; l++)
            if (dut.g_y[n / MESH_X].g_x[n % MESH_X].u_router.f_rd[p][l] &&
                is_head(dut.g_y[n / MESH_X].g_x[n % MESH_X].u_router.front[p][l].ftype)) begin
              automatic logic [NPORT-1:0] c = dut.g_y[n / MESH_X].g_x[n % MESH_X].u_router.front_cand[p][l];
              automatic logic [NPORT-1:0] s = dut.g_y[n / MESH_X].g_x[n % MESH_X].u_router.sa1_req[p];
              if ((c[P_EAST] || c[P_WEST]) && (s[P_NORTH] || s[P_SOUTH])) n_adapt++;
            end
      end
    end
  end

  task automatic inject(int src, int id, int dx, int dy, int dz, int hx, int hy);
    int tx, ty;
    tx = (dz == 0) ? dx : hx;
    ty = (dz == 0) ? dy : hy;
    sb[id] = '{node: ty * MESH_X + tx, got: 0, inj_cyc: -1, ej_cyc: -1, done_cyc: -1};
    n_sent++;
    @(negedge clk);
    while (!pkt_ready[src]) @(negedge clk);
    pkt_valid[src] = 1'b1;
    pkt_hdr[src]   = '{hub_x: 2'(hx), hub_y: 2'(hy), dst_x: 2'(dx), dst_y: 2'(dy), dst_z: 2'(dz)};
    pkt_id[src]    = 32'(id);
    @(negedge clk);
    pkt_valid[src] = 1'b0;
  endtask

  task automatic wait_done(int max_cycles);
    for (int k = 0; k < max_cycles && n_done < n_sent; k++) @(posedge clk);
    chk(n_done == n_sent, $sformatf("all packets delivered (%0d of %0d)", n_done, n_sent));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int byp0;
    pkt_valid = '0; pkt_hdr = '0; pkt_id = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // ---- part 1: the (0,0) -> hub (3,2) example
    byp0 = n_byp;
    inject(0, 1, 1, 1, 2, 3, 2);
    wait_done(200);
    chk(sb[1].ej_cyc - sb[1].inj_cyc == 12,
        $sformatf("example head latency 12 cycles (got %0d)", sb[1].ej_cyc - sb[1].inj_cyc));
    chk(n_byp - byp0 == 3 * 5, $sformatf("15 bypass hops in the example (got %0d)", n_byp - byp0));

    // ---- part 2: uniform random traffic from every node
    for (int s = 0; s < NN; s++) begin
        fork
          automatic int src = s;
          begin
            for (int k = 0; k < 25; k++) begin
              int dx, dy, dz, hx, hy;
              dx = $urandom_range(0, MESH_X-1);
              dy = $urandom_range(0, MESH_Y-1);
              dz = ($urandom_range(0, 3) == 0) ? $urandom_range(1, MESH_Z-1) : 0;
              hx = $urandom_range(0, MESH_X-1);
              hy = $urandom_range(0, MESH_Y-1);
              inject(src, 1000 + src * 100 + k, dx, dy, dz, hx, hy);
              repeat ($urandom_range(0, 6)) @(negedge clk);
            end
          end
        join_none
    end
    wait fork;
    wait_done(20000);

    // ---- part 3: inter-layer traffic in an inhomogeneous layer. One node in
    // four has a 3D router, (1,1) (3,1) (1,3) (3,3); every source sends packets
    // for other layers to its nearest hub and some in-layer packets.
    begin
      int lat0, n0;
      lat0 = int'(lat_sum); n0 = n_done;
      for (int s = 0; s < NN; s++) begin
        fork
          automatic int src = s;
          begin
            for (int k = 0; k < 20; k++) begin
              int sx, sy, hx, hy, dz;
              sx = src % MESH_X; sy = src / MESH_X;
              hx = (sx <= 1) ? 1 : 3;
              hy = (sy <= 1) ? 1 : 3;
              dz = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, MESH_Z-1);
              inject(src, 5000 + src * 100 + k, $urandom_range(0, 3), $urandom_range(0, 3), dz, hx, hy);
              repeat ($urandom_range(2, 10)) @(negedge clk);
            end
          end
        join_none
      end
      wait fork;
      wait_done(20000);
      $display("inhomogeneous-layer traffic: packets=%0d avg_latency=%0d",
               n_done - n0, (n_done > n0) ? (int'(lat_sum) - lat0) / (n_done - n0) : 0);
    end

    $display("layer: packets=%0d avg_latency=%0d bypass_hops=%0d buffered_flits=%0d svc_tags=%0d adaptive=%0d stall_cycles=%0d ejected_flits=%0d",
             n_done, (n_done > 0) ? int'(lat_sum / n_done) : 0, n_byp, n_buf, n_tag, n_adapt, n_stall, n_ej);
    chk(n_byp > 0, "bypass happened");
    chk(n_buf > 0, "buffered path happened");
    chk(n_tag > 0, "SVC tagging happened");
    chk(n_adapt > 0, "adaptive non-XY choice happened");
    chk(n_stall > 0, "credit stall happened");
    chk(n_ej == 5 * n_sent, "every flit ejected once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
