// slide_crossbar: input multiplexers, output multiplexers and bypass Mux2.
//
// The crossbar is built from two sets of multiplexers. Each input multiplexer
// selects the front flit of the lane that won SA-I at that input port; each
// output multiplexer selects the input that won SA-II for that output, and the
// flit's SVC tag is rewritten to the output VC it was given (1 = SVC). The result
// (xb_*) is loaded into the output's switch-traversal register.
// The second part is Mux2 in front of every output link register: it passes the
// switch-traversal register when that holds a flit, and otherwise the raw input
// link of the opposite side when bypass control let that flit bypass. The
// ejection port has no bypass path. All combinational.
module slide_crossbar
  import slide_pkg::*;
(
  input  flit_t [NPORT-1:0][NLANE-1:0] lane_flit,  // front flit of each lane
  input  logic  [NPORT-1:0][NLANE-1:0] in_win,     // SA-I winner per input
  input  logic  [NPORT-1:0][NPORT-1:0] out_gnt,    // SA-II [output][input]
  input  logic  [NPORT-1:0]            out_svc,    // SVC tag per output
  output logic  [NPORT-1:0]            xb_valid,
  output flit_t [NPORT-1:0]            xb_flit,
  input  logic  [NPORT-1:0]            st_valid,
  input  flit_t [NPORT-1:0]            st_flit,
  input  logic  [NPORT-1:0]            byp_valid,  // per input port
  input  flit_t [NPORT-1:0]            in_flit,    // raw input links
  output logic  [NPORT-1:0]            link_valid,
  output flit_t [NPORT-1:0]            link_flit
);
  flit_t [NPORT-1:0] imux;

  always_comb begin
    for (int i = 0; i < NPORT; i++) begin
      imux[i] = '0;
      for (int l = 0; l < NLANE; l++)
        if (in_win[i][l]) imux[i] = lane_flit[i][l];
    end
    for (int o = 0; o < NPORT; o++) begin
      xb_valid[o] = |out_gnt[o];
      xb_flit[o]  = '0;
      for (int i = 0; i < NPORT; i++)
        if (out_gnt[o][i]) xb_flit[o] = imux[i];
      xb_flit[o].svc = out_svc[o];
    end
    for (int o = 0; o < NPORT; o++) begin
      int unsigned src;
      src = opposite(o);
      if (st_valid[o]) begin
        link_valid[o] = 1'b1;
        link_flit[o]  = st_flit[o];
      end else if (o != P_LOCAL && byp_valid[src]) begin
        link_valid[o] = 1'b1;
        link_flit[o]  = in_flit[src];
      end else begin
        link_valid[o] = 1'b0;
        link_flit[o]  = '0;
      end
    end
  end
endmodule
