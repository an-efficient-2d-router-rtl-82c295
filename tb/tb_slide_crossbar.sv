// tb_slide_crossbar: random lane contents, SA-I winners, SA-II grants, tags,
// switch-traversal registers and bypass requests. Checks that each output gets
// the granted input's winning lane flit with the given SVC tag, and that Mux2
// prefers the switch-traversal register, else passes the opposite input's
// bypassing flit, and never bypasses into the ejection port.
`timescale 1ns/1ps
module tb_slide_crossbar;
  import slide_pkg::*;
  flit_t [NPORT-1:0][NLANE-1:0] lane_flit;
  logic  [NPORT-1:0][NLANE-1:0] in_win;
  logic  [NPORT-1:0][NPORT-1:0] out_gnt;
  logic  [NPORT-1:0]            out_svc, xb_valid, st_valid, byp_valid, link_valid;
  flit_t [NPORT-1:0]            xb_flit, st_flit, in_flit, link_flit;
  int checks = 0, failures = 0;

  slide_crossbar dut (.*);

  function automatic flit_t rnd_flit();
    flit_t f;
    f = {$urandom, $urandom, $urandom, $urandom, $urandom};
    return f;
  endfunction

  function automatic int opp(int p);
    return (p == P_EAST) ? P_WEST : (p == P_WEST) ? P_EAST :
           (p == P_NORTH) ? P_SOUTH : (p == P_SOUTH) ? P_NORTH : -1;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int perm [NPORT];
      for (int p = 0; p < NPORT; p++) begin
        for (int l = 0; l < NLANE; l++) lane_flit[p][l] = rnd_flit();
        in_win[p]  = NLANE'(1) << $urandom_range(0, 2);
        st_flit[p] = rnd_flit();
        in_flit[p] = rnd_flit();
        perm[p] = p;
      end
      perm.shuffle();
      for (int o = 0; o < NPORT; o++)
        out_gnt[o] = ($urandom_range(0, 2) == 0) ? '0 : NPORT'(1) << perm[o];
      out_svc   = NPORT'($urandom);
      st_valid  = NPORT'($urandom);
      byp_valid = NPORT'($urandom);
      #1;
      for (int o = 0; o < NPORT; o++) begin
        flit_t e;
        bit ev;
        int src;
        ev = (out_gnt[o] != 0);
        e = '0;
        for (int i = 0; i < NPORT; i++)
          if (out_gnt[o][i])
            for (int l = 0; l < NLANE; l++) if (in_win[i][l]) e = lane_flit[i][l];
        e.svc = out_svc[o];
        checks++;
        if (xb_valid[o] !== ev || (ev && xb_flit[o] !== e)) begin
          failures++;
          $display("FAIL t=%0d crossbar out %0d", t, o);
        end
        src = opp(o);
        checks++;
        if (st_valid[o]) begin
          if (!link_valid[o] || link_flit[o] !== st_flit[o]) begin failures++; $display("FAIL mux2 st %0d", o); end
        end else if (src >= 0 && byp_valid[src]) begin
          if (!link_valid[o] || link_flit[o] !== in_flit[src]) begin failures++; $display("FAIL mux2 byp %0d", o); end
        end else if (link_valid[o]) begin
          failures++; $display("FAIL mux2 idle %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
