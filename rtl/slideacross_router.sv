// slideacross_router: five-port adaptive virtual-channel router with single-cycle
// intra-dimension bypass (SlideAcross), meant to replace the 2D routers of an
// inhomogeneous 3D network-on-chip.
//
// Two datapaths share the output links.
//  * Adaptive pipeline (3 cycles per hop). Cycle 1: bypass control (BC) rejects
//    the flit, it is written into its lane (BW) while route computation (RC)
//    stores the productive output ports with it. Cycle 2: each lane's front flit
//    picks an output (selection unit masks congested ports), SA-I picks a lane per
//    input, SA-II picks an input per output, and VC allocation runs on the winners
//    in the same cycle: a head keeps its class VC or is tagged with the output's
//    slide virtual channel (SVC). The winner moves to the output's switch-traversal
//    register. Cycle 3: the register passes the output multiplexer (Mux2) into the
//    output link register, seen by the next router one cycle later.
//  * Bypass (1 cycle per hop, link included). A flit in the SVC arriving on an
//    inter-router port goes straight through Mux2 into the opposite output's link
//    register in its arrival cycle, when that output got no SA grant in the
//    previous cycle and the bypass rules of bypass_control hold.
// Lanes per input: VC0, VC1 (class VCs chosen at injection for deadlock freedom)
// and the SVC; at most one packet may sit in any SVC buffer.
// Interface: in_valid/in_flit per input port with in_credit[port][lane] pulses
// back upstream (registered, one per freed slot); out_valid/out_flit per output
// port, registered, with out_credit[port][vc] pulses from downstream; byp_event
// marks output flits that came through the bypass path.
// The document gives the two datapaths, the SVC and its tagging rules, SA-I/SA-II
// with VA after SA, and the bypass condition; buffer depths, credit flow control,
// round-robin arbitration, the selection metric and the body-flit bypass rules
// are this design's choices.
module slideacross_router
  import slide_pkg::*;
#(
  parameter int MY_X      = 1,
  parameter int MY_Y      = 1,
  parameter int MY_Z      = 0,
  parameter int VC_DEPTH  = 4,
  parameter int SVC_DEPTH = 5
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic  [NPORT-1:0]             in_valid,
  input  flit_t [NPORT-1:0]             in_flit,
  output logic  [NPORT-1:0][NLANE-1:0]  in_credit,
  output logic  [NPORT-1:0]             out_valid,
  output flit_t [NPORT-1:0]             out_flit,
  input  logic  [NPORT-1:0][NLANE-1:0]  out_credit,
  output logic  [NPORT-1:0]             byp_event
);
  localparam int RC_W = FLIT_W + NPORT;

  localparam logic [COORD_W-1:0] CX = COORD_W'(MY_X);
  localparam logic [COORD_W-1:0] CY = COORD_W'(MY_Y);
  localparam logic [COORD_W-1:0] CZ = COORD_W'(MY_Z);

  // ------------------------------------------------------------------ state
  logic  [NPORT-1:0][NLANE-1:0]       lane_active;
  logic  [NPORT-1:0][NLANE-1:0][2:0]  lane_route;
  logic  [NPORT-1:0][NLANE-1:0][1:0]  lane_ovc;
  logic  [NPORT-1:0]                  st_valid;
  flit_t [NPORT-1:0]                  st_flit;

  // ------------------------------------------------------------------ stage 1
  logic [NPORT-1:0][NPORT-1:0]        in_cand;
  logic [NPORT-1:0]                   byp, claim, rel;

  logic [NPORT-1:0][NLANE-1:0]            f_wr, f_rd, f_empty, f_full;
  logic [NPORT-1:0][NLANE-1:0][RC_W-1:0]  f_wdata, f_rdata;

  logic [NPORT-1:0][NLANE-1:0][CNT_W-1:0] cr;
  logic [NPORT-1:0]                       cr_svc_full;
  logic [NPORT-1:0]                       svc_free, tag_ok, tag;
  logic [NPORT-1:0][1:0]                  vc_free;

  for (genvar p = 0; p < NPORT; p++) begin : g_in
    route_compute u_rc (
      .my_x(CX), .my_y(CY), .my_z(CZ),
      .hdr (get_hdr(in_flit[p])),
      .cand(in_cand[p])
    );

    if (p == P_LOCAL) begin : g_nobyp
      assign byp[p]   = 1'b0;
      assign claim[p] = 1'b0;
      assign rel[p]   = 1'b0;
    end else begin : g_byp
      localparam int O = opposite(p);
      bypass_control #(.PORT(p)) u_bc (
        .in_valid     (in_valid[p]),
        .in_flit      (in_flit[p]),
        .cand         (in_cand[p]),
        .lane_empty   (f_empty[p][L_SVC]),
        .lane_active  (lane_active[p][L_SVC]),
        .lane_route   (lane_route[p][L_SVC]),
        .lane_out_vc  (lane_ovc[p][L_SVC]),
        .out_idle     (!st_valid[O]),
        .svc_free     (svc_free[O]),
        .ds_svc_empty (cr_svc_full[O]),
        .ds_svc_credit(cr[O][L_SVC] != '0),
        .bypass       (byp[p]),
        .claim        (claim[p]),
        .release_svc  (rel[p])
      );
    end

    for (genvar l = 0; l < NLANE; l++) begin : g_lane
      localparam int LDEPTH = (l == L_SVC) ? SVC_DEPTH : VC_DEPTH;
      assign f_wr[p][l] = in_valid[p] && !byp[p] &&
                          ((l == L_SVC) ? in_flit[p].svc
                                        : (!in_flit[p].svc && in_flit[p].vc == l[0]));
      assign f_wdata[p][l] = {in_cand[p], in_flit[p]};
      flit_fifo #(.W(RC_W), .DEPTH(LDEPTH)) u_buf (
        .clk    (clk),
        .rst_n  (rst_n),
        .wr_en  (f_wr[p][l]),
        .wr_data(f_wdata[p][l]),
        .rd_en  (f_rd[p][l]),
        .rd_data(f_rdata[p][l]),
        .empty  (f_empty[p][l]),
        .full   (f_full[p][l]),
        .count  ()
      );
    end
  end

  // ------------------------------------------------------------------ stage 2
  flit_t [NPORT-1:0][NLANE-1:0]            front;
  logic  [NPORT-1:0][NLANE-1:0][NPORT-1:0] front_cand;
  logic  [NPORT-1:0][NLANE-1:0]            lane_ready;
  logic  [NPORT-1:0][NLANE-1:0][NPORT-1:0] lane_port;
  logic  [NPORT-1:0][NLANE-1:0][NPORT-1:0] su_avail;
  logic  [NPORT-1:0][NLANE-1:0][NPORT-1:0][CNT_W-1:0] su_metric;
  logic  [NPORT-1:0][NLANE-1:0][NPORT-1:0] su_sel;
  logic  [NPORT-1:0][NLANE-1:0]            su_valid;

  for (genvar p = 0; p < NPORT; p++) begin : g_sel
    for (genvar l = 0; l < NLANE; l++) begin : g_l
      always_comb begin
        front[p][l]      = flit_t'(f_rdata[p][l][FLIT_W-1:0]);
        front_cand[p][l] = f_rdata[p][l][RC_W-1:FLIT_W];
        for (int o = 0; o < NPORT; o++) begin
          su_avail[p][l][o]  = (o != P_LOCAL && tag_ok[o]) ||
                               (vc_free[o][front[p][l].vc] && cr[o][front[p][l].vc] != '0);
          su_metric[p][l][o] = cr[o][front[p][l].vc];
        end
      end
      selection_unit u_su (
        .cand  (front_cand[p][l]),
        .avail (su_avail[p][l]),
        .metric(su_metric[p][l]),
        .sel   (su_sel[p][l]),
        .valid (su_valid[p][l])
      );
      always_comb begin
        if (is_head(front[p][l].ftype)) begin
          lane_ready[p][l] = !f_empty[p][l] && su_valid[p][l];
          lane_port[p][l]  = su_sel[p][l];
        end else begin
          lane_ready[p][l] = !f_empty[p][l] && lane_active[p][l] &&
                             cr[lane_route[p][l]][lane_ovc[p][l]] != '0;
          lane_port[p][l]  = NPORT'(1) << lane_route[p][l];
        end
      end
    end
  end

  logic [NPORT-1:0][NLANE-1:0] sa1_win;
  logic [NPORT-1:0][NPORT-1:0] sa1_req;     // [input][output]
  logic [NPORT-1:0][NPORT-1:0] sa2_gnt;     // [output][input]
  logic [NPORT-1:0]            sa2_any;
  logic [NPORT-1:0]            in_gnt;

  for (genvar p = 0; p < NPORT; p++) begin : g_sa1
    always_comb begin
      in_gnt[p] = 1'b0;
      for (int o = 0; o < NPORT; o++) in_gnt[p] |= sa2_gnt[o][p];
    end
    sa_input_arbiter u_sa1 (
      .clk       (clk),
      .rst_n     (rst_n),
      .lane_ready(lane_ready[p]),
      .lane_port (lane_port[p]),
      .advance   (in_gnt[p]),
      .win       (sa1_win[p]),
      .req       (sa1_req[p])
    );
    assign f_rd[p] = in_gnt[p] ? sa1_win[p] : '0;
  end

  sa_output_arbiter u_sa2 (
    .clk    (clk),
    .rst_n  (rst_n),
    .req    (sa1_req),
    .gnt    (sa2_gnt),
    .out_req(sa2_any)
  );

  // Per-output view of the SA-II winner, then VC / SVC allocation.
  logic [NPORT-1:0]      o_head, o_tail, o_vc;
  logic [NPORT-1:0][1:0] o_body_ovc, o_ovc;
  logic [NPORT-1:0]      o_valid;

  always_comb begin
    for (int o = 0; o < NPORT; o++) begin
      o_valid[o]    = sa2_any[o];
      o_head[o]     = 1'b0;
      o_tail[o]     = 1'b0;
      o_vc[o]       = 1'b0;
      o_body_ovc[o] = '0;
      for (int p = 0; p < NPORT; p++) begin
        for (int l = 0; l < NLANE; l++) begin
          if (sa2_gnt[o][p] && sa1_win[p][l]) begin
            o_head[o]     = is_head(front[p][l].ftype);
            o_tail[o]     = is_tail(front[p][l].ftype);
            o_vc[o]       = front[p][l].vc;
            o_body_ovc[o] = lane_ovc[p][l];
          end
        end
      end
      if (o_head[o]) o_ovc[o] = tag[o] ? 2'(L_SVC) : {1'b0, o_vc[o]};
      else           o_ovc[o] = o_body_ovc[o];
    end
  end

  logic [NPORT-1:0]            o_svc;
  logic [NPORT-1:0][NLANE-1:0] cr_dec;

  for (genvar o = 0; o < NPORT; o++) begin : g_out
    assign o_svc[o] = o_valid[o] && (o_ovc[o] == 2'(L_SVC));
    always_comb begin
      cr_dec[o] = '0;
      if (o_valid[o]) cr_dec[o][o_ovc[o]] = 1'b1;
    end

    credit_counter #(.VC_DEPTH(VC_DEPTH), .SVC_DEPTH(SVC_DEPTH)) u_cc (
      .clk      (clk),
      .rst_n    (rst_n),
      .credit_in(out_credit[o]),
      .dec      (cr_dec[o]),
      .byp_dec  ((o != P_LOCAL) ? byp[opposite(o)] : 1'b0),
      .count    (cr[o]),
      .svc_full (cr_svc_full[o])
    );

    vc_allocator u_va (
      .clk     (clk),
      .rst_n   (rst_n),
      .head_gnt(o_valid[o] && o_head[o] && !o_tail[o]),
      .gnt_vc  (o_vc[o]),
      .tag     (tag[o]),
      .tail_rel(o_valid[o] && o_tail[o] && !o_head[o] && o_ovc[o] != 2'(L_SVC)),
      .rel_vc  (o_ovc[o][0]),
      .vc_free (vc_free[o])
    );

    if (o == P_LOCAL) begin : g_eject
      // The ejection port has no tagging unit.
      assign svc_free[o] = 1'b0;
      assign tag_ok[o]   = 1'b0;
      assign tag[o]      = 1'b0;
    end else begin : g_tag
      localparam int I = opposite(o);
      svc_tagger u_tag (
        .clk         (clk),
        .rst_n       (rst_n),
        .ds_svc_empty(cr_svc_full[o]),
        .byp_any     (byp[I]),
        .byp_claim   (claim[I]),
        .head_gnt    (o_valid[o] && o_head[o]),
        .head_only   (!o_tail[o]),
        .release_svc ((o_valid[o] && o_tail[o] && !o_head[o] && o_ovc[o] == 2'(L_SVC)) || rel[I]),
        .svc_free    (svc_free[o]),
        .tag_ok      (tag_ok[o]),
        .tag         (tag[o])
      );
    end
  end

  // ------------------------------------------------------------------ crossbar
  logic  [NPORT-1:0] xb_valid, link_valid;
  flit_t [NPORT-1:0] xb_flit, link_flit;

  slide_crossbar u_xb (
    .lane_flit (front),
    .in_win    (sa1_win),
    .out_gnt   (sa2_gnt),
    .out_svc   (o_svc),
    .xb_valid  (xb_valid),
    .xb_flit   (xb_flit),
    .st_valid  (st_valid),
    .st_flit   (st_flit),
    .byp_valid (byp),
    .in_flit   (in_flit),
    .link_valid(link_valid),
    .link_flit (link_flit)
  );

  // ------------------------------------------------------------------ registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lane_active <= '0;
      lane_route  <= '0;
      lane_ovc    <= '0;
      st_valid    <= '0;
      st_flit     <= '0;
      out_valid   <= '0;
      out_flit    <= '0;
      in_credit   <= '0;
      byp_event   <= '0;
    end else begin
      st_valid  <= xb_valid;
      st_flit   <= xb_flit;
      out_valid <= link_valid;
      out_flit  <= link_flit;
      for (int o = 0; o < NPORT; o++)
        byp_event[o] <= !st_valid[o] && link_valid[o];
      for (int p = 0; p < NPORT; p++) begin
        for (int l = 0; l < NLANE; l++) begin
          in_credit[p][l] <= f_rd[p][l] || (l == L_SVC && byp[p]);
          if (f_rd[p][l]) begin
            if (is_head(front[p][l].ftype) && !is_tail(front[p][l].ftype)) begin
              lane_active[p][l] <= 1'b1;
              for (int o = 0; o < NPORT; o++) begin
                if (sa1_req[p][o]) begin
                  lane_route[p][l] <= 3'(o);
                  lane_ovc[p][l]   <= o_ovc[o];
                end
              end
            end else if (is_tail(front[p][l].ftype) && !is_head(front[p][l].ftype)) begin
              lane_active[p][l] <= 1'b0;
            end
          end
        end
        if (claim[p]) begin
          lane_active[p][L_SVC] <= 1'b1;
          lane_route[p][L_SVC]  <= 3'(opposite(p));
          lane_ovc[p][L_SVC]    <= 2'(L_SVC);
        end else if (rel[p]) begin
          lane_active[p][L_SVC] <= 1'b0;
        end
      end
    end
  end

  // A flit must never find its lane full: upstream credits prevent it.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < NPORT; p++)
        for (int l = 0; l < NLANE; l++)
          assert (!(f_wr[p][l] && f_full[p][l])) else $error("router: lane overflow");
    end
  end
endmodule
