// sa_output_arbiter: second switch-allocation stage (SA-II), the 5:1 arbiters.
//
// One round-robin arbiter per output port chooses among the input ports whose
// SA-I winner requests that output. gnt[o] is one-hot over inputs. out_req[o]
// tells whether output o had any request: when it had none, the output will carry
// no crossbar flit in the next cycle and its bypass path (Mux2) is set up.
// Each arbiter's priority moves past its winner after every grant.
module sa_output_arbiter
  import slide_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NPORT-1:0][NPORT-1:0] req,     // [input][output]
  output logic [NPORT-1:0][NPORT-1:0] gnt,     // [output][input]
  output logic [NPORT-1:0]            out_req
);
  logic [NPORT-1:0][NPORT-1:0] req_t;          // [output][input]

  always_comb begin
    for (int o = 0; o < NPORT; o++)
      for (int i = 0; i < NPORT; i++)
        req_t[o][i] = req[i][o];
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_out
    rr_arbiter #(.N(NPORT)) u_rr (
      .clk    (clk),
      .rst_n  (rst_n),
      .req    (req_t[o]),
      .advance(1'b1),
      .gnt    (gnt[o])
    );
    assign out_req[o] = |req_t[o];
  end
endmodule
