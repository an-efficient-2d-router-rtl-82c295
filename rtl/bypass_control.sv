// bypass_control: bypassing control (BC) of one inter-router input port.
//
// In the cycle a flit arrives, decides whether it takes the bypass datapath to
// the output on the opposite side (West->East, East->West, South->North,
// North->South) or is written to the input buffer. Only flits tagged SVC are
// considered. A head flit bypasses when
//   - continuing straight is a productive (minimal) move,
//   - the opposite output is idle this cycle (SA granted it nothing last cycle),
//   - that output's SVC is not assigned and the downstream SVC buffer is empty,
//   - this port's SVC buffer is empty.
// The head then claims the output's SVC; body flits of the same packet bypass
// while the SVC buffer stays empty, the output is idle and a downstream SVC credit
// is left, and the tail releases the SVC. A flit that cannot bypass is buffered
// and later ones follow it through the crossbar, which keeps flits in order.
// Combinational, off registered state only plus the arriving flit. The SVC-only
// check and the idle-output condition are the document's; the rules for body
// flits are this design's.
module bypass_control
  import slide_pkg::*;
#(
  parameter int PORT = P_WEST
) (
  input  logic             in_valid,
  input  flit_t            in_flit,
  input  logic [NPORT-1:0] cand,          // RC of the arriving flit
  input  logic             lane_empty,    // this port's SVC buffer
  input  logic             lane_active,   // SVC lane owns an output VC
  input  logic [2:0]       lane_route,    // its output port
  input  logic [1:0]       lane_out_vc,   // its output VC
  input  logic             out_idle,      // opposite output free this cycle
  input  logic             svc_free,      // opposite output SVC unassigned
  input  logic             ds_svc_empty,  // downstream SVC buffer empty
  input  logic             ds_svc_credit, // downstream SVC has room
  output logic             bypass,
  output logic             claim,
  output logic             release_svc
);
  localparam int O = opposite(PORT);

  logic head, tail, owns;

  always_comb begin
    head   = is_head(in_flit.ftype);
    tail   = is_tail(in_flit.ftype);
    owns   = lane_active && (int'(lane_route) == O) && (int'(lane_out_vc) == L_SVC);
    bypass = 1'b0;
    if (in_valid && in_flit.svc && lane_empty && out_idle) begin
      if (head)
        bypass = cand[O] && !lane_active && svc_free && ds_svc_empty;
      else
        bypass = owns && ds_svc_credit;
    end
    claim       = bypass && head && !tail;
    release_svc = bypass && tail && !head;
  end
endmodule
