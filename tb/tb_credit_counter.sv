// tb_credit_counter: random sends (crossbar and bypass) and credit returns
// against a model; checks the three counts and the downstream-SVC-empty flag.
`timescale 1ns/1ps
module tb_credit_counter;
  import slide_pkg::*;
  localparam int VCD = 4, SVCD = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NLANE-1:0] credit_in, dec;
  logic byp_dec, svc_full;
  logic [NLANE-1:0][CNT_W-1:0] count;
  int checks = 0, failures = 0;
  int m [NLANE];

  credit_counter #(.VC_DEPTH(VCD), .SVC_DEPTH(SVCD)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    credit_in = '0; dec = '0; byp_dec = 0;
    m[0] = VCD; m[1] = VCD; m[2] = SVCD;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int take [NLANE];
      @(negedge clk);
      for (int v = 0; v < NLANE; v++) begin
        checks++;
        if (int'(count[v]) != m[v]) begin
          failures++;
          $display("FAIL t=%0d vc %0d count=%0d exp %0d", t, v, count[v], m[v]);
        end
      end
      checks++;
      if (svc_full !== (m[2] == SVCD)) failures++;
      for (int v = 0; v < NLANE; v++) begin
        int cap;
        cap = (v == 2) ? SVCD : VCD;
        dec[v] = (m[v] > 0) && $urandom_range(0, 1);
        credit_in[v] = (m[v] + (dec[v] ? -1 : 0) < cap) && (m[v] < cap) && $urandom_range(0, 1);
      end
      byp_dec = !dec[2] && (m[2] > 0) && $urandom_range(0, 1);
      if (byp_dec && credit_in[2] == 0 && m[2] == 0) byp_dec = 0;
      @(posedge clk);
      #1;
      for (int v = 0; v < NLANE; v++)
        m[v] = m[v] + int'(credit_in[v]) - int'(dec[v]) - ((v == 2) ? int'(byp_dec) : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
