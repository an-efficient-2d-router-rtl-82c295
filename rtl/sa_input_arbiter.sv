// sa_input_arbiter: first switch-allocation stage (SA-I) of one input port.
//
// The crossbar has one input multiplexer per input port, so each port can send
// one flit per cycle. Among the lanes (VC0, VC1, SVC) that have a flit ready to
// go, a round-robin arbiter picks one; the winner's one-hot output-port request
// is passed on to SA-II. The round-robin priority only moves when SA-II also
// grants this input (`advance`), so a lane that loses in SA-II keeps its turn.
// Combinational outputs, priority pointer updated at the clock edge.
module sa_input_arbiter
  import slide_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NLANE-1:0]            lane_ready,
  input  logic [NLANE-1:0][NPORT-1:0] lane_port,
  input  logic                        advance,
  output logic [NLANE-1:0]            win,
  output logic [NPORT-1:0]            req
);
  rr_arbiter #(.N(NLANE)) u_rr (
    .clk    (clk),
    .rst_n  (rst_n),
    .req    (lane_ready),
    .advance(advance),
    .gnt    (win)
  );

  always_comb begin
    req = '0;
    for (int l = 0; l < NLANE; l++)
      if (win[l]) req = lane_port[l];
  end
endmodule
