// rr_arbiter: round-robin arbiter used by both switch-allocation stages.
//
// Combinational grant: the first requester at or after the priority pointer wins.
// When `advance` is high and a grant is given, the pointer moves to the position
// after the winner at the next clock edge, so every requester is served within N
// rounds. Reset puts the pointer at requester 0. The document names the two
// arbitration stages; the round-robin policy is this design's choice.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;
  logic [IW-1:0] win_idx;

  always_comb begin
    gnt     = '0;
    win_idx = '0;
    for (int k = 0; k < N; k++) begin
      if (gnt == '0 && req[(int'(ptr) + k) % N]) begin
        gnt[(int'(ptr) + k) % N] = 1'b1;
        win_idx                  = IW'((int'(ptr) + k) % N);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (advance && (gnt != '0)) begin
      ptr <= (int'(win_idx) == N - 1) ? '0 : win_idx + 1'b1;
    end
  end

  // At most one grant, and only to a requester.
  always_comb assert ((gnt & ~req) == '0);
endmodule
