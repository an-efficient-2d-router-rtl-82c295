// tb_slide_ni_inject: the injector at (1,1,0) gets packets for targets left,
// right and in its own column, on and off its layer. Checks the VC rule (left:
// VC0, right: VC1, same column: the VC with more credits), the 5-flit framing,
// the zero SVC tag, header and id, one flit per cycle, and that it stops when the
// VC runs out of credits and resumes when a credit returns.
`timescale 1ns/1ps
module tb_slide_ni_inject;
  import slide_pkg::*;
  localparam int VCD = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pkt_valid, pkt_ready, flit_valid;
  hdr_t pkt_hdr;
  logic [31:0] pkt_id;
  logic [1:0] credit_in;
  flit_t flit;
  int checks = 0, failures = 0;
  int cr [2];
  flit_t rx [$];
  int rx_cyc [$];
  int cyc = 0;

  slide_ni_inject dut (.*);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0d %s", cyc, m); end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (flit_valid) begin rx.push_back(flit); rx_cyc.push_back(cyc); end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // returns all credits of the flits seen so far unless `hold` is set
  bit hold [2] = '{0, 0};
  int owed [2];
  always @(negedge clk) begin
    credit_in = '0;
    for (int v = 0; v < 2; v++)
      if (!hold[v] && owed[v] > 0) begin credit_in[v] = 1; owed[v]--; end
  end
  always @(posedge clk) if (flit_valid) owed[flit.vc]++;

  task automatic send(int id, int dx, int dy, int dz, int hx, int hy, int exp_vc, bit stall, int n_exp = 5);
    hdr_t h;
    h = '{hub_x: 2'(hx), hub_y: 2'(hy), dst_x: 2'(dx), dst_y: 2'(dy), dst_z: 2'(dz)};
    rx.delete(); rx_cyc.delete();
    @(negedge clk);
    while (!pkt_ready) @(negedge clk);
    pkt_valid = 1; pkt_hdr = h; pkt_id = 32'(id);
    @(negedge clk);
    pkt_valid = 0;
    repeat (stall ? 30 : 12) @(negedge clk);
    chk(rx.size() == n_exp, $sformatf("pkt %0d: %0d flits (got %0d)", id, n_exp, rx.size()));
    for (int i = 0; i < rx.size(); i++) begin
      chk(rx[i].vc == 1'(exp_vc), $sformatf("pkt %0d VC %0d", id, exp_vc));
      chk(rx[i].svc == 0, "SVC tag zero at injection");
      chk(rx[i].ftype == ((i == 0) ? FT_HEAD : (i == 4) ? FT_TAIL : FT_BODY), "flit type");
      chk(rx[i].data[63:32] == 32'(id) && rx[i].data[71:64] == 8'(i), "id and index");
      if (!stall && i > 0) chk(rx_cyc[i] == rx_cyc[i-1] + 1, "one flit per cycle");
    end
    if (rx.size() > 0) chk(hdr_t'(rx[0].data[HDR_W-1:0]) == h, "header in head flit");
  endtask

  initial begin
    pkt_valid = 0; pkt_hdr = '0; pkt_id = '0; credit_in = '0;
    owed[0] = 0; owed[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    send(1, 0, 3, 0, 0, 0, 0, 0);        // left  -> VC0
    send(2, 3, 0, 0, 0, 0, 1, 0);        // right -> VC1
    send(3, 1, 3, 0, 0, 0, 0, 0);        // same column, equal credits -> VC0
    send(4, 0, 0, 2, 3, 2, 1, 0);        // other layer: hub at x=3 -> VC1
    // VC0 out of credits: the injector stops after 4 flits, resumes on a credit
    hold[0] = 1;
    send(5, 0, 2, 0, 0, 0, 0, 1, VCD);
    @(negedge clk);
    hold[0] = 0;
    @(negedge clk);
    hold[0] = 1;
    repeat (4) @(negedge clk);
    chk(rx.size() == 5, "resumes after one credit returns");
    // now VC0 has no credit and VC1 has all: a same-column packet takes VC1
    send(6, 1, 0, 0, 0, 0, 1, 0);
    hold[0] = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
