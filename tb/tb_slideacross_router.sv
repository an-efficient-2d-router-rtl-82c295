// tb_slideacross_router: end-to-end test of the SlideAcross router at its default
// parameters (router at x=1, y=1, layer 0, 4-flit VC lanes, 5-flit SVC lanes).
//
// The testbench plays the four neighbour routers and the local network interface:
// sources obey the credits returned on in_credit and the SVC rules (one SVC packet
// at a time, only into an empty downstream SVC), sinks return credits after a
// random delay and can hold them back to create congestion.
// Directed part: a single-cycle bypass West->East of a whole SVC packet, the
// 3-cycle buffered path with SVC tagging, a turn, ejection, adaptive selection
// away from a congested East port, and a bypass refused because the output was
// taken by the crossbar. Random part: packets from all five inputs; a scoreboard
// checks each arrives complete, in order, on a productive port, with its class VC,
// never interleaved with another packet in an output VC, and SVC heads only enter
// an empty downstream SVC. Each mechanism is counted and must occur.
`timescale 1ns/1ps
module tb_slideacross_router;
  import slide_pkg::*;

  localparam int MX = 1, MY = 1, MZ = 0;
  localparam int VCD = 4, SVCD = 5, PKT = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  [NPORT-1:0]            in_valid;
  flit_t [NPORT-1:0]            in_flit;
  logic  [NPORT-1:0][NLANE-1:0] in_credit;
  logic  [NPORT-1:0]            out_valid;
  flit_t [NPORT-1:0]            out_flit;
  logic  [NPORT-1:0][NLANE-1:0] out_credit;
  logic  [NPORT-1:0]            byp_event;

  slideacross_router dut (
    .clk, .rst_n, .in_valid, .in_flit, .in_credit,
    .out_valid, .out_flit, .out_credit, .byp_event
  );

  int checks = 0, failures = 0;
  int cyc = 0;

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  // ------------------------------------------------------------- flit helpers
  function automatic flit_t mk_flit(int idx, int len, int id, int dx, int dy, int dz,
                                    int hx, int hy, bit vc, bit svc);
    flit_t f;
    hdr_t  h;
    f = '0;
    if (len == 1)           f.ftype = FT_HEADTAIL;
    else if (idx == 0)      f.ftype = FT_HEAD;
    else if (idx == len-1)  f.ftype = FT_TAIL;
    else                    f.ftype = FT_BODY;
    f.vc  = vc;
    f.svc = svc;
    h.dst_x = COORD_W'(dx); h.dst_y = COORD_W'(dy); h.dst_z = COORD_W'(dz);
    h.hub_x = COORD_W'(hx); h.hub_y = COORD_W'(hy);
    f.data[HDR_W-1:0] = h;
    f.data[63:32]     = id;
    f.data[71:64]     = 8'(idx);
    f.data[127:96]    = 32'hC0DE_0000 ^ id;
    return f;
  endfunction

  // Independent route model: productive ports for a target seen from (MX,MY,MZ).
  function automatic logic [NPORT-1:0] exp_ports(int dx, int dy, int dz, int hx, int hy);
    int tx, ty;
    logic [NPORT-1:0] m;
    tx = (dz == MZ) ? dx : hx;
    ty = (dz == MZ) ? dy : hy;
    m = '0;
    if (tx > MX) m[P_EAST] = 1;
    if (tx < MX) m[P_WEST] = 1;
    if (ty > MY) m[P_NORTH] = 1;
    if (ty < MY) m[P_SOUTH] = 1;
    if (m == '0) m[P_LOCAL] = 1;
    return m;
  endfunction

  // ------------------------------------------------------------- sources
  int src_cr [NPORT][NLANE];
  bit src_busy [NPORT];

  always @(posedge clk) begin
    for (int p = 0; p < NPORT; p++)
      for (int l = 0; l < NLANE; l++)
        if (rst_n && in_credit[p][l]) src_cr[p][l]++;
  end

  // Scoreboard, indexed by packet id.
  typedef struct {
    logic [NPORT-1:0] ports;
    bit               vc;
    int               len;
    int               got;
    int               port;
    int               tx_cyc;
    int               head_rx_cyc;
    bit               svc_out;
  } pkt_rec_t;
  pkt_rec_t sb [int];
  int n_sent = 0, n_done = 0;

  task automatic send_pkt(int p, int id, int dx, int dy, int dz, int hx, int hy,
                          bit vc, bit svc, int len);
    int lane;
    lane = svc ? L_SVC : int'(vc);
    sb[id] = '{ports: exp_ports(dx, dy, dz, hx, hy), vc: vc, len: len, got: 0,
               port: -1, tx_cyc: -1, head_rx_cyc: -1, svc_out: 0};
    n_sent++;
    for (int i = 0; i < len; ) begin
      @(negedge clk);
      if (src_cr[p][lane] > 0) begin
        in_valid[p] = 1'b1;
        in_flit[p]  = mk_flit(i, len, id, dx, dy, dz, hx, hy, vc, svc);
        src_cr[p][lane]--;
        if (i == 0) sb[id].tx_cyc = cyc + 1;
        i++;
      end else begin
        in_valid[p] = 1'b0;
      end
    end
    @(negedge clk);
    in_valid[p] = 1'b0;
  endtask

  // ------------------------------------------------------------- sinks
  bit hold [NPORT];                  // hold back credits of this output
  int ret_at [NPORT][NLANE][$];      // cycles at which credits are due
  int ds_occ [NPORT][NLANE];         // flits in the modelled downstream lane
  int cur_pkt [NPORT][NLANE];        // packet owning each output VC, -1 none
  int rx_lat_min_byp = 1000, rx_lat_buf [$];
  int max_credit_delay = 3;

  // mechanism counters
  int n_bypass = 0, n_buffered = 0, n_svc_tag = 0, n_adaptive = 0, n_stall = 0;
  int n_byp_denied = 0, n_eject = 0, n_turn = 0, n_vc0 = 0, n_vc1 = 0;

  always @(posedge clk) begin
    cyc = cyc + 1;
    if (rst_n) begin
      for (int o = 0; o < NPORT; o++) begin
        if (out_valid[o]) begin
          flit_t f;
          int id, idx, ovc;
          f   = out_flit[o];
          id  = int'(f.data[63:32]);
          idx = int'(f.data[71:64]);
          ovc = f.svc ? L_SVC : int'(f.vc);
          if (o == P_LOCAL) n_eject++;
          if (byp_event[o]) n_bypass++;
          chk(f.data[127:96] == (32'hC0DE_0000 ^ id), "payload intact");
          chk(!(o == P_LOCAL && f.svc), "no SVC tag on ejection");
          if (!sb.exists(id)) begin
            chk(0, $sformatf("unknown packet %0d on port %0d", id, o));
          end else begin
            chk(idx == sb[id].got, $sformatf("pkt %0d flit order (%0d vs %0d)", id, idx, sb[id].got));
            chk(f.vc == sb[id].vc, "class VC kept");
            if (is_head(f.ftype)) begin
              chk(sb[id].ports[o], $sformatf("pkt %0d left on productive port %0d", id, o));
              chk(cur_pkt[o][ovc] == -1, "output VC free for new packet");
              if (ovc == L_SVC) chk(ds_occ[o][L_SVC] == 0, "SVC head enters empty downstream SVC");
              sb[id].port = o;
              sb[id].head_rx_cyc = cyc;
              sb[id].svc_out = f.svc;
              if (f.svc && !byp_event[o]) n_svc_tag++;
              if (sb[id].ports[P_EAST] | sb[id].ports[P_WEST])
                if (o == P_NORTH || o == P_SOUTH) n_adaptive++;
              if (f.vc) n_vc1++; else n_vc0++;
              if (!is_tail(f.ftype)) cur_pkt[o][ovc] = id;
            end else begin
              chk(o == sb[id].port, "body on same port as head");
              chk(cur_pkt[o][ovc] == id, "no interleaving inside an output VC");
              chk(f.svc == sb[id].svc_out, "body follows head's SVC tag");
              if (is_tail(f.ftype)) cur_pkt[o][ovc] = -1;
            end
            sb[id].got++;
            if (sb[id].got == sb[id].len) n_done++;
          end
          ds_occ[o][ovc]++;
          chk(ds_occ[o][ovc] <= ((ovc == L_SVC) ? SVCD : VCD), "downstream lane never overflows");
          ret_at[o][ovc].push_back(cyc + 1 + $urandom_range(0, max_credit_delay));
        end
      end
      // stall and refused-bypass observation
      for (int p = 0; p < NPORT; p++) begin
        for (int l = 0; l < NLANE; l++)
          if (!dut.f_empty[p][l] && !dut.lane_ready[p][l]) n_stall++;
        if (in_valid[p] && !dut.byp[p]) n_buffered++;
        if (p != P_LOCAL && in_valid[p] && in_flit[p].svc && !dut.byp[p]) n_byp_denied++;
      end
    end
  end

  // credit return, one per VC per cycle
  always @(negedge clk) begin
    for (int o = 0; o < NPORT; o++)
      for (int l = 0; l < NLANE; l++) begin
        out_credit[o][l] = 1'b0;
        if (!hold[o] && ret_at[o][l].size() > 0 && ret_at[o][l][0] <= cyc) begin
          void'(ret_at[o][l].pop_front());
          out_credit[o][l] = 1'b1;
          ds_occ[o][l]--;
        end
      end
  end

  task automatic wait_done(int max_cycles);
    for (int k = 0; k < max_cycles && n_done < n_sent; k++) @(posedge clk);
    chk(n_done == n_sent, $sformatf("all packets delivered (%0d of %0d)", n_done, n_sent));
    repeat (12) @(posedge clk);
  endtask

  // ------------------------------------------------------------- watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- stimulus
  int id_next = 100;

  task automatic random_source(int p, int npkts);
    for (int k = 0; k < npkts; k++) begin
      int dx, dy, dz, hx, hy, len;
      bit vc, svc;
      int tx;
      // a destination that is reachable minimally through this input
      do begin
        dx = $urandom_range(0, MESH_X-1);
        dy = $urandom_range(0, MESH_Y-1);
        dz = ($urandom_range(0, 3) == 0) ? $urandom_range(0, MESH_Z-1) : MZ;
        hx = $urandom_range(0, MESH_X-1);
        hy = $urandom_range(0, MESH_Y-1);
        tx = (dz == MZ) ? dx : hx;
      end while (!((p == P_LOCAL) ||
                   (p == P_WEST  && tx >= MX) ||
                   (p == P_EAST  && tx <= MX) ||
                   (p == P_SOUTH && ((dz == MZ) ? dy : hy) >= MY && tx == MX) ||
                   (p == P_NORTH && ((dz == MZ) ? dy : hy) <= MY && tx == MX) ||
                   (p == P_SOUTH && ((dz == MZ) ? dy : hy) >= MY) ||
                   (p == P_NORTH && ((dz == MZ) ? dy : hy) <= MY)));
      vc  = (tx < MX) ? 1'b0 : (tx > MX) ? 1'b1 : 1'($urandom_range(0, 1));
      svc = (p != P_LOCAL) && !src_busy[p] && src_cr[p][L_SVC] == SVCD && $urandom_range(0, 1);
      len = ($urandom_range(0, 7) == 0) ? 1 : PKT;
      send_pkt(p, id_next++, dx, dy, dz, hx, hy, vc, svc, len);
      repeat ($urandom_range(0, 4)) @(negedge clk);
    end
  endtask

  initial begin
    in_valid   = '0;
    in_flit    = '0;
    out_credit = '0;
    for (int p = 0; p < NPORT; p++) begin
      hold[p] = 0;
      src_busy[p] = 0;
      src_cr[p][L_VC0] = VCD; src_cr[p][L_VC1] = VCD; src_cr[p][L_SVC] = SVCD;
      for (int l = 0; l < NLANE; l++) begin
        ds_occ[p][l] = 0;
        cur_pkt[p][l] = -1;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    $display("phase 1 @%0d sent=%0d done=%0d", cyc, n_sent, n_done);
    // 1. SVC packet West -> East: single-cycle bypass for every flit.
    send_pkt(P_WEST, 1, 3, 1, MZ, 0, 0, 1'b1, 1'b1, PKT);
    wait_done(50);
    chk(sb[1].port == P_EAST, "bypass packet left East");
    chk(sb[1].head_rx_cyc - sb[1].tx_cyc == 1, $sformatf("bypass latency 1 cycle (got %0d)",
        sb[1].head_rx_cyc - sb[1].tx_cyc));
    chk(sb[1].svc_out == 1'b1, "bypassed packet stays in SVC");
    chk(n_bypass == PKT, $sformatf("all %0d flits bypassed (got %0d)", PKT, n_bypass));

    $display("phase 2 @%0d sent=%0d done=%0d", cyc, n_sent, n_done);
    // 2. Plain VC1 packet West -> East: buffered, 3 cycles, tagged SVC on exit.
    send_pkt(P_WEST, 2, 3, 1, MZ, 0, 0, 1'b1, 1'b0, PKT);
    wait_done(50);
    chk(sb[2].head_rx_cyc - sb[2].tx_cyc == 3, $sformatf("buffered latency 3 cycles (got %0d)",
        sb[2].head_rx_cyc - sb[2].tx_cyc));
    chk(sb[2].svc_out == 1'b1, "buffered packet tagged SVC at free output");

    $display("phase 3 @%0d sent=%0d done=%0d", cyc, n_sent, n_done);
    // 3. SVC packet that must turn (West -> North): buffered, not bypassed.
    send_pkt(P_WEST, 3, 1, 3, MZ, 0, 0, 1'b1, 1'b1, PKT);
    wait_done(50);
    chk(sb[3].port == P_NORTH, "turning packet left North");
    chk(sb[3].head_rx_cyc - sb[3].tx_cyc == 3, "turning packet took the 3-cycle path");
    n_turn++;

    $display("phase 4 @%0d sent=%0d done=%0d", cyc, n_sent, n_done);
    // 4. Ejection of a packet for this router.
    send_pkt(P_SOUTH, 4, MX, MY, MZ, 0, 0, 1'b0, 1'b0, PKT);
    wait_done(50);
    chk(sb[4].port == P_LOCAL, "packet for this router ejected");

    $display("phase 5 @%0d sent=%0d done=%0d", cyc, n_sent, n_done);
    // 5. Another-layer packet heads for the hub given in the header.
    send_pkt(P_LOCAL, 5, 0, 0, 2, 1, 3, 1'b0, 1'b0, PKT);
    wait_done(50);
    chk(sb[5].port == P_NORTH, "other-layer packet routed to its hub (North)");
    chk(sb[5].svc_out == 1'b1, "tagged SVC when leaving the source router");

    $display("phase 6 @%0d sent=%0d done=%0d", cyc, n_sent, n_done);
    // 6. Congest East, then a North-East packet must be diverted North.
    hold[P_EAST] = 1;
    send_pkt(P_LOCAL, 6, 3, 1, MZ, 0, 0, 1'b1, 1'b0, PKT);  // takes East SVC
    send_pkt(P_LOCAL, 7, 3, 1, MZ, 0, 0, 1'b1, 1'b0, PKT);  // takes East VC1, stalls
    repeat (6) @(negedge clk);
    send_pkt(P_SOUTH, 8, 2, 2, MZ, 0, 0, 1'b1, 1'b0, PKT);  // East congested
    repeat (20) @(negedge clk);
    chk(sb[8].port == P_NORTH, "adaptive selection avoided congested East");
    chk(sb[7].got == VCD, $sformatf("stalled packet sent only %0d credits' worth (got %0d)", VCD, sb[7].got));
    hold[P_EAST] = 0;
    wait_done(100);

    $display("phase 7 @%0d sent=%0d done=%0d", cyc, n_sent, n_done);
    // 7. Bypass refused: East output taken by a crossbar flit in the cycle the
    //    SVC head arrives at West.
    fork
      send_pkt(P_LOCAL, 9, 3, 1, MZ, 0, 0, 1'b1, 1'b0, 1);
      begin
        repeat (2) @(negedge clk);
        send_pkt(P_WEST, 10, 3, 1, MZ, 0, 0, 1'b1, 1'b1, PKT);
      end
    join
    wait_done(100);
    chk(sb[10].head_rx_cyc - sb[10].tx_cyc >= 3, "SVC packet buffered when output busy");

    $display("phase 8 @%0d sent=%0d done=%0d", cyc, n_sent, n_done);
    // 8. Random traffic from all inputs.
    fork
      random_source(P_LOCAL, 60);
      random_source(P_EAST, 60);
      random_source(P_WEST, 60);
      random_source(P_NORTH, 60);
      random_source(P_SOUTH, 60);
      begin
        repeat (300) @(negedge clk);
        hold[P_NORTH] = 1;
        repeat (60) @(negedge clk);
        hold[P_NORTH] = 0;
      end
    join
    wait_done(5000);

    $display("mechanisms: bypass_flits=%0d buffered_flits=%0d svc_tags=%0d adaptive=%0d stall_cycles=%0d bypass_refused=%0d ejected=%0d turns=%0d vc0=%0d vc1=%0d",
             n_bypass, n_buffered, n_svc_tag, n_adaptive, n_stall, n_byp_denied, n_eject, n_turn, n_vc0, n_vc1);
    chk(n_bypass > 0, "bypass happened");
    chk(n_buffered > 0, "buffered path happened");
    chk(n_svc_tag > 0, "SVC tagging happened");
    chk(n_adaptive > 0, "adaptive selection happened");
    chk(n_stall > 0, "credit stall happened");
    chk(n_byp_denied > 0, "refused bypass happened");
    chk(n_eject > 0, "ejection happened");
    chk(n_vc0 > 0 && n_vc1 > 0, "both class VCs used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
