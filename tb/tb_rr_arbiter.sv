// tb_rr_arbiter: checks the round-robin arbiter against a reference model.
// Random request vectors with random `advance`; the model keeps its own pointer
// and predicts the one-hot grant each cycle. Also checks that a requester that
// keeps asking is served within N grants.
`timescale 1ns/1ps
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req, gnt;
  logic advance;
  int checks = 0, failures = 0;
  int ptr = 0;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .advance, .gnt);

  function automatic logic [N-1:0] model(logic [N-1:0] r, int p);
    for (int k = 0; k < N; k++)
      if (r[(p + k) % N]) return N'(1) << ((p + k) % N);
    return '0;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wait_cnt;
    req = '0; advance = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      req = N'($urandom);
      advance = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (gnt !== model(req, ptr)) begin
        failures++;
        $display("FAIL t=%0d req=%b gnt=%b exp=%b", t, req, gnt, model(req, ptr));
      end
      if (advance && gnt != 0)
        for (int i = 0; i < N; i++) if (gnt[i]) ptr = (i + 1) % N;
    end
    // fairness: requester 3 always asks together with everyone else
    wait_cnt = 0;
    for (int t = 0; t < 3 * N; t++) begin
      @(negedge clk);
      req = '1; advance = 1;
      #1;
      if (gnt[3]) break;
      wait_cnt++;
    end
    checks++;
    if (wait_cnt >= N) begin failures++; $display("FAIL fairness %0d", wait_cnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
