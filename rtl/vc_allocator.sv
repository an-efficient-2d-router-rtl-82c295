// vc_allocator: class-VC allocation at one output port, done after SA-II.
//
// A packet keeps its own class VC (VC0 or VC1) from hop to hop, so allocation is
// only "is my VC at this output held by another packet?". When the SA-II winner
// is a head flit that was not tagged SVC, its class VC at this output becomes
// busy (head-tail flits hold nothing); the tail flit leaving through that VC frees
// it. Heads only request ports where some VC can be taken, so the allocation after
// SA never fails and needs no speculation. State: two busy bits, cleared by reset.
module vc_allocator (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       head_gnt,   // SA-II winner is a head (not head-tail) flit
  input  logic       gnt_vc,     // its class VC
  input  logic       tag,        // it was tagged SVC instead
  input  logic       tail_rel,   // a tail left through a class VC
  input  logic       rel_vc,
  output logic [1:0] vc_free
);
  logic [1:0] busy;

  assign vc_free = ~busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0;
    end else begin
      for (int v = 0; v < 2; v++) begin
        if (tail_rel && rel_vc == v[0])                   busy[v] <= 1'b0;
        else if (head_gnt && !tag && gnt_vc == v[0])      busy[v] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert (!(head_gnt && !tag && busy[gnt_vc]))
      else $error("vc_allocator: head granted onto a busy VC");
  end
endmodule
