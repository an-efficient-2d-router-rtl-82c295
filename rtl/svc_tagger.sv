// svc_tagger: SVC allocator / tagging unit of one inter-router output port.
//
// Holds whether this output's slide virtual channel belongs to a packet. A head
// flit leaving through the port is tagged SVC when (1) the SVC is not assigned and
// (2) the SVC buffer of the downstream router is empty (all its credits are back),
// which keeps at most one packet in any SVC buffer. A head taking the bypass path
// into this output claims the SVC the same way; any flit bypassing into the SVC
// has priority over the crossbar in that cycle.
// The tail of the owning packet, sent by crossbar or bypass, releases the SVC.
// Outputs: svc_free (for bypass control), tag_ok (for the selection unit and SA),
// and `tag`, the tag given to the current SA-II winner.
module svc_tagger (
  input  logic clk,
  input  logic rst_n,
  input  logic ds_svc_empty,
  input  logic byp_any,     // a flit bypasses into this output's SVC now
  input  logic byp_claim,   // bypassing head (not head-tail) takes the SVC
  input  logic head_gnt,    // SA-II winner is a head flit
  input  logic head_only,   // ... and not a head-tail flit
  input  logic release_svc, // tail of the owner leaves
  output logic svc_free,
  output logic tag_ok,
  output logic tag
);
  logic busy;

  assign svc_free = !busy && ds_svc_empty;
  assign tag_ok   = svc_free && !byp_any;
  assign tag      = head_gnt && tag_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          busy <= 1'b0;
    else if (byp_claim)                  busy <= 1'b1;
    else if (tag && head_only)           busy <= 1'b1;
    else if (release_svc)                busy <= 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert (!(byp_claim && busy)) else $error("svc_tagger: SVC claimed twice");
  end
endmodule
