// credit_counter: downstream buffer credits of one output port.
//
// Three counters, for the downstream VC0, VC1 and SVC lanes, start full at reset
// (VC_DEPTH, VC_DEPTH, SVC_DEPTH). A flit sent through the crossbar (`dec`, one
// bit per VC) or through the bypass path (`byp_dec`, SVC only) takes one credit;
// a credit pulse from downstream (`credit_in`) gives one back. The same counter
// may be taken from and given to in one cycle. svc_full says the downstream SVC
// buffer is empty, the second SVC tagging rule. Credit-based flow control is this
// design's choice; the document only says downstream credits are checked.
module credit_counter
  import slide_pkg::*;
#(
  parameter int VC_DEPTH  = 4,
  parameter int SVC_DEPTH = 5
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NLANE-1:0]            credit_in,
  input  logic [NLANE-1:0]            dec,
  input  logic                        byp_dec,
  output logic [NLANE-1:0][CNT_W-1:0] count,
  output logic                        svc_full
);
  logic [NLANE-1:0] take;

  assign take     = dec | {byp_dec, 2'b00};
  assign svc_full = (int'(count[L_SVC]) == SVC_DEPTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count[L_VC0] <= CNT_W'(VC_DEPTH);
      count[L_VC1] <= CNT_W'(VC_DEPTH);
      count[L_SVC] <= CNT_W'(SVC_DEPTH);
    end else begin
      for (int v = 0; v < NLANE; v++)
        count[v] <= count[v] + CNT_W'(credit_in[v]) - CNT_W'(take[v]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(dec[L_SVC] && byp_dec)) else $error("credit_counter: two SVC flits in one cycle");
      for (int v = 0; v < NLANE; v++)
        assert (!(take[v] && count[v] == '0)) else $error("credit_counter: flit sent without credit");
    end
  end
endmodule
