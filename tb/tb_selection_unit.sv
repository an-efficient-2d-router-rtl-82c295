// tb_selection_unit: random candidate masks (as route computation produces them),
// availability flags and credit metrics; the chosen port must be available, a
// candidate, the less congested of two (ties to X), and nothing when all are
// congested.
`timescale 1ns/1ps
module tb_selection_unit;
  import slide_pkg::*;
  logic [NPORT-1:0] cand, avail, sel;
  logic [NPORT-1:0][CNT_W-1:0] metric;
  logic valid;
  int checks = 0, failures = 0;

  selection_unit dut (.cand, .avail, .metric, .sel, .valid);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [NPORT-1:0] e, ok;
      int xp, yp;
      cand = '0;
      if ($urandom_range(0, 5) == 0) cand[P_LOCAL] = 1;
      else begin
        case ($urandom_range(0, 2))
          0: cand[P_EAST] = 1; 1: cand[P_WEST] = 1; default: ;
        endcase
        case ($urandom_range(0, 2))
          0: cand[P_NORTH] = 1; 1: cand[P_SOUTH] = 1; default: ;
        endcase
      end
      avail = NPORT'($urandom);
      for (int o = 0; o < NPORT; o++) metric[o] = CNT_W'($urandom_range(0, 5));
      #1;
      ok = cand & avail;
      xp = ok[P_EAST] ? P_EAST : ok[P_WEST] ? P_WEST : -1;
      yp = ok[P_NORTH] ? P_NORTH : ok[P_SOUTH] ? P_SOUTH : -1;
      e = '0;
      if (ok[P_LOCAL]) e[P_LOCAL] = 1;
      else if (xp >= 0 && yp >= 0) e[(metric[yp] > metric[xp]) ? yp : xp] = 1;
      else if (xp >= 0) e[xp] = 1;
      else if (yp >= 0) e[yp] = 1;
      checks++;
      if (sel !== e || valid !== (e != 0)) begin
        failures++;
        $display("FAIL cand=%b avail=%b sel=%b exp=%b", cand, avail, sel, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
