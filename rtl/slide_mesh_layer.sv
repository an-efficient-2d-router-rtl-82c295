// slide_mesh_layer: one layer of an inhomogeneous 3D network-on-chip built from
// SlideAcross routers, a MESH_X x MESH_Y mesh.
//
// Node n = y*MESH_X + x holds a slideacross_router at (x, y, LAYER) and a
// slide_ni_inject that turns packet requests into flits on the router's local
// input. Neighbouring routers are joined by their East/West and North/South
// links and the matching credit wires; links at the mesh edge are tied off
// (minimal routing never uses them). The ejection port of every router is brought
// out (ej_valid/ej_flit) and consumes one flit per cycle, returning its credit on
// the next cycle. Packets for another layer are routed to the in-layer position
// of the 3D router named in their header and leave through that node's ejection
// port: the 3D routers and vertical links themselves are not part of this RTL, so
// the node's local port stands for the vertical port there.
// byp_event gives, per node and output port, the flits that took the bypass path.
module slide_mesh_layer
  import slide_pkg::*;
#(
  parameter int LAYER     = 0,
  parameter int VC_DEPTH  = 4,
  parameter int SVC_DEPTH = 5
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic  [MESH_X*MESH_Y-1:0]            pkt_valid,
  output logic  [MESH_X*MESH_Y-1:0]            pkt_ready,
  input  hdr_t  [MESH_X*MESH_Y-1:0]            pkt_hdr,
  input  logic  [MESH_X*MESH_Y-1:0][31:0]      pkt_id,
  output logic  [MESH_X*MESH_Y-1:0]            ej_valid,
  output flit_t [MESH_X*MESH_Y-1:0]            ej_flit,
  output logic  [MESH_X*MESH_Y-1:0][NPORT-1:0] byp_event
);
  localparam int NN = MESH_X * MESH_Y;

  logic  [NN-1:0][NPORT-1:0]            r_in_valid, r_out_valid;
  flit_t [NN-1:0][NPORT-1:0]            r_in_flit, r_out_flit;
  logic  [NN-1:0][NPORT-1:0][NLANE-1:0] r_in_credit, r_out_credit;
  logic  [NN-1:0][NLANE-1:0]            ej_credit;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N = y * MESH_X + x;

      slide_ni_inject #(
        .MY_X(x), .MY_Z(LAYER), .PKT_LEN(5), .VC_DEPTH(VC_DEPTH)
      ) u_ni (
        .clk       (clk),
        .rst_n     (rst_n),
        .pkt_valid (pkt_valid[N]),
        .pkt_ready (pkt_ready[N]),
        .pkt_hdr   (pkt_hdr[N]),
        .pkt_id    (pkt_id[N]),
        .credit_in (r_in_credit[N][P_LOCAL][1:0]),
        .flit_valid(r_in_valid[N][P_LOCAL]),
        .flit      (r_in_flit[N][P_LOCAL])
      );

      slideacross_router #(
        .MY_X(x), .MY_Y(y), .MY_Z(LAYER), .VC_DEPTH(VC_DEPTH), .SVC_DEPTH(SVC_DEPTH)
      ) u_router (
        .clk       (clk),
        .rst_n     (rst_n),
        .in_valid  (r_in_valid[N]),
        .in_flit   (r_in_flit[N]),
        .in_credit (r_in_credit[N]),
        .out_valid (r_out_valid[N]),
        .out_flit  (r_out_flit[N]),
        .out_credit(r_out_credit[N]),
        .byp_event (byp_event[N])
      );

      // ejection: always accepts, credit back one cycle later
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) ej_credit[N] <= '0;
        else begin
          ej_credit[N] <= '0;
          if (r_out_valid[N][P_LOCAL])
            ej_credit[N] <= r_out_flit[N][P_LOCAL].vc ? NLANE'(2) : NLANE'(1);
        end
      end
      assign ej_valid[N]                = r_out_valid[N][P_LOCAL];
      assign ej_flit[N]                 = r_out_flit[N][P_LOCAL];
      assign r_out_credit[N][P_LOCAL]   = ej_credit[N];

      // West / East
      if (x > 0) begin : g_w
        assign r_in_valid[N][P_WEST]   = r_out_valid[N-1][P_EAST];
        assign r_in_flit[N][P_WEST]    = r_out_flit[N-1][P_EAST];
        assign r_out_credit[N][P_WEST] = r_in_credit[N-1][P_EAST];
      end else begin : g_w_edge
        assign r_in_valid[N][P_WEST]   = 1'b0;
        assign r_in_flit[N][P_WEST]    = '0;
        assign r_out_credit[N][P_WEST] = '0;
      end
      if (x < MESH_X - 1) begin : g_e
        assign r_in_valid[N][P_EAST]   = r_out_valid[N+1][P_WEST];
        assign r_in_flit[N][P_EAST]    = r_out_flit[N+1][P_WEST];
        assign r_out_credit[N][P_EAST] = r_in_credit[N+1][P_WEST];
      end else begin : g_e_edge
        assign r_in_valid[N][P_EAST]   = 1'b0;
        assign r_in_flit[N][P_EAST]    = '0;
        assign r_out_credit[N][P_EAST] = '0;
      end
      // South / North
      if (y > 0) begin : g_s
        assign r_in_valid[N][P_SOUTH]   = r_out_valid[N-MESH_X][P_NORTH];
        assign r_in_flit[N][P_SOUTH]    = r_out_flit[N-MESH_X][P_NORTH];
        assign r_out_credit[N][P_SOUTH] = r_in_credit[N-MESH_X][P_NORTH];
      end else begin : g_s_edge
        assign r_in_valid[N][P_SOUTH]   = 1'b0;
        assign r_in_flit[N][P_SOUTH]    = '0;
        assign r_out_credit[N][P_SOUTH] = '0;
      end
      if (y < MESH_Y - 1) begin : g_n
        assign r_in_valid[N][P_NORTH]   = r_out_valid[N+MESH_X][P_SOUTH];
        assign r_in_flit[N][P_NORTH]    = r_out_flit[N+MESH_X][P_SOUTH];
        assign r_out_credit[N][P_NORTH] = r_in_credit[N+MESH_X][P_SOUTH];
      end else begin : g_n_edge
        assign r_in_valid[N][P_NORTH]   = 1'b0;
        assign r_in_flit[N][P_NORTH]    = '0;
        assign r_out_credit[N][P_NORTH] = '0;
      end
    end
  end
endmodule
