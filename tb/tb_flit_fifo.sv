// tb_flit_fifo: random writes and reads against a queue model; checks the front
// entry, empty/full/count every cycle, including simultaneous read and write.
`timescale 1ns/1ps
module tb_flit_fifo;
  localparam int W = 137, D = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en, rd_en, empty, full;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q [$];

  flit_fifo #(.W(W), .DEPTH(D)) dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data, .empty, .full, .count);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == D), "full");
      chk(int'(count) == q.size(), "count");
      if (q.size() > 0) chk(rd_data == q[0], "front entry");
      wr_en = (q.size() < D) && $urandom_range(0, 1);
      rd_en = (q.size() > 0) && $urandom_range(0, 1);
      wr_data = {$urandom, $urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      #1;
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
