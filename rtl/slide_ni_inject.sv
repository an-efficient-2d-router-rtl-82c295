// slide_ni_inject: injection side of a network interface, with the class-VC
// assignment that keeps the adaptive routing deadlock free.
//
// Accepts a packet request (header and a 32-bit packet id) when pkt_ready is high
// and sends PKT_LEN flits into the router's local input, one per cycle while the
// chosen VC has credits. The VC is fixed for the whole trip: VC0 when the in-layer
// target (destination, or the vertical hub for another layer) lies to the left
// (smaller x), VC1 when it lies to the right, and for the same column the VC with
// more free credits (VC0 on a tie). Every flit leaves with its SVC tag cleared.
// Payload: head carries the header in its low bits; every flit carries the id in
// bits 63:32 and its index in bits 71:64. Outputs are registered; credit_in pulses
// come from the router's local input (VC0, VC1). The left/right rule and the zero
// SVC tag are the document's; the payload layout is this design's.
module slide_ni_inject
  import slide_pkg::*;
#(
  parameter int MY_X     = 1,
  parameter int MY_Z     = 0,
  parameter int PKT_LEN  = 5,
  parameter int VC_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pkt_valid,
  output logic        pkt_ready,
  input  hdr_t        pkt_hdr,
  input  logic [31:0] pkt_id,
  input  logic [1:0]  credit_in,
  output logic        flit_valid,
  output flit_t       flit
);
  logic                   busy;
  logic [7:0]             idx;
  hdr_t                   hdr_q;
  logic [31:0]            id_q;
  logic                   vc_q;
  logic [1:0][CNT_W-1:0]  cr;
  logic                   vc_new;
  logic                   send;
  logic [COORD_W-1:0]     tx;

  assign pkt_ready = !busy;
  assign send      = busy && (cr[vc_q] != '0);

  always_comb begin
    tx = (pkt_hdr.dst_z == COORD_W'(MY_Z)) ? pkt_hdr.dst_x : pkt_hdr.hub_x;
    if (tx < COORD_W'(MY_X))      vc_new = 1'b0;
    else if (tx > COORD_W'(MY_X)) vc_new = 1'b1;
    else                          vc_new = (cr[1] > cr[0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      idx        <= '0;
      hdr_q      <= '0;
      id_q       <= '0;
      vc_q       <= 1'b0;
      cr         <= {CNT_W'(VC_DEPTH), CNT_W'(VC_DEPTH)};
      flit_valid <= 1'b0;
      flit       <= '0;
    end else begin
      for (int v = 0; v < 2; v++)
        cr[v] <= cr[v] + CNT_W'(credit_in[v]) - CNT_W'(send && vc_q == v[0]);
      flit_valid <= send;
      if (send) begin
        flit       <= '0;
        flit.vc    <= vc_q;
        flit.svc   <= 1'b0;
        if (PKT_LEN == 1)                 flit.ftype <= FT_HEADTAIL;
        else if (idx == 0)                flit.ftype <= FT_HEAD;
        else if (int'(idx) == PKT_LEN-1)  flit.ftype <= FT_TAIL;
        else                              flit.ftype <= FT_BODY;
        flit.data[HDR_W-1:0] <= (idx == 0) ? hdr_q : '0;
        flit.data[63:32]     <= id_q;
        flit.data[71:64]     <= idx;
        if (int'(idx) == PKT_LEN-1) begin
          busy <= 1'b0;
          idx  <= '0;
        end else begin
          idx  <= idx + 1'b1;
        end
      end
      if (pkt_valid && !busy) begin
        busy  <= 1'b1;
        idx   <= '0;
        hdr_q <= pkt_hdr;
        id_q  <= pkt_id;
        vc_q  <= vc_new;
      end
    end
  end
endmodule
