// tb_sa_output_arbiter: SA-II, five 5:1 round-robin arbiters. Inputs request one
// output each (as after SA-I); every output must grant one requester in
// round-robin order, and out_req must flag exactly the requested outputs.
`timescale 1ns/1ps
module tb_sa_output_arbiter;
  import slide_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NPORT-1:0][NPORT-1:0] req, gnt;
  logic [NPORT-1:0] out_req;
  int checks = 0, failures = 0;
  int ptr [NPORT];

  sa_output_arbiter dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    for (int o = 0; o < NPORT; o++) ptr[o] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int i = 0; i < NPORT; i++)
        req[i] = ($urandom_range(0, 3) == 0) ? '0 : NPORT'(1) << $urandom_range(0, 4);
      #1;
      for (int o = 0; o < NPORT; o++) begin
        int w;
        w = -1;
        for (int k = 0; k < NPORT; k++)
          if (w < 0 && req[(ptr[o] + k) % NPORT][o]) w = (ptr[o] + k) % NPORT;
        checks++;
        if (gnt[o] !== ((w >= 0) ? NPORT'(1) << w : '0) || out_req[o] !== (w >= 0)) begin
          failures++;
          $display("FAIL t=%0d out %0d gnt=%b exp input %0d", t, o, gnt[o], w);
        end
        if (w >= 0) ptr[o] = (w + 1) % NPORT;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
