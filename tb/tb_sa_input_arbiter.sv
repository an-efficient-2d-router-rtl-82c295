// tb_sa_input_arbiter: SA-I over three lanes. The winner must be a ready lane
// chosen round-robin (pointer moving only on `advance`), and the request passed
// to SA-II must be the winner's port vector.
`timescale 1ns/1ps
module tb_sa_input_arbiter;
  import slide_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NLANE-1:0] lane_ready, win;
  logic [NLANE-1:0][NPORT-1:0] lane_port;
  logic advance;
  logic [NPORT-1:0] req;
  int checks = 0, failures = 0, ptr = 0;

  sa_input_arbiter dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lane_ready = '0; lane_port = '0; advance = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int w;
      logic [NPORT-1:0] er;
      @(negedge clk);
      lane_ready = NLANE'($urandom);
      for (int l = 0; l < NLANE; l++) lane_port[l] = NPORT'(1) << $urandom_range(0, 4);
      advance = 1'($urandom);
      #1;
      w = -1;
      for (int k = 0; k < NLANE; k++)
        if (w < 0 && lane_ready[(ptr + k) % NLANE]) w = (ptr + k) % NLANE;
      er = (w >= 0) ? lane_port[w] : '0;
      checks++;
      if (win !== ((w >= 0) ? NLANE'(1) << w : '0) || req !== er) begin
        failures++;
        $display("FAIL t=%0d ready=%b win=%b exp lane %0d", t, lane_ready, win, w);
      end
      if (advance && w >= 0) ptr = (w + 1) % NLANE;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
