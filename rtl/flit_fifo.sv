// flit_fifo: one lane of an input port (VC0, VC1 or the slide virtual channel).
//
// A circular buffer of DEPTH entries of W bits. The router stores each flit
// together with the output-port candidates that route computation found for it,
// so buffer write and route computation happen in the same cycle. Write and read
// may happen in the same cycle. Reads are first-word-fall-through: rd_data is the
// oldest entry whenever `empty` is low. The upstream router's credits guarantee
// that no flit arrives when the lane is full; an assertion checks this. Lane
// depths are not fixed by the document (defaults chosen here).
module flit_fifo #(
  parameter int W     = 137,
  parameter int DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [W-1:0]               wr_data,
  input  logic                       rd_en,
  output logic [W-1:0]               rd_data,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign empty   = (count == '0);
  assign full    = (int'(count) == DEPTH);
  assign rd_data = mem[rptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (wr_en) wptr <= inc(wptr);
      if (rd_en) rptr <= inc(rptr);
      count <= count + CW'(wr_en) - CW'(rd_en);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(wr_en && full && !rd_en)) else $error("flit_fifo: write to a full lane");
      assert (!(rd_en && empty))          else $error("flit_fifo: read from an empty lane");
    end
  end
endmodule
