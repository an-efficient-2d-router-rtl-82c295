// tb_vc_allocator: packets of both class VCs are granted and released at random;
// a model of the two busy bits checks vc_free after every cycle, including
// SVC-tagged heads, which must leave the class VCs untouched.
`timescale 1ns/1ps
module tb_vc_allocator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic head_gnt, gnt_vc, tag, tail_rel, rel_vc;
  logic [1:0] vc_free;
  int checks = 0, failures = 0;
  bit busy [2];

  vc_allocator dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    head_gnt = 0; gnt_vc = 0; tag = 0; tail_rel = 0; rel_vc = 0;
    busy[0] = 0; busy[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (vc_free !== {!busy[1], !busy[0]}) begin
        failures++;
        $display("FAIL t=%0d vc_free=%b", t, vc_free);
      end
      gnt_vc = 1'($urandom);
      tag    = 1'($urandom);
      head_gnt = $urandom_range(0, 1) && (tag || !busy[gnt_vc]);
      rel_vc = 1'($urandom);
      tail_rel = $urandom_range(0, 1) && busy[rel_vc] && !(head_gnt && !tag && gnt_vc == rel_vc);
      @(posedge clk);
      #1;
      if (tail_rel) busy[rel_vc] = 0;
      if (head_gnt && !tag) busy[gnt_vc] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
