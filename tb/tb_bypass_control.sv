// tb_bypass_control: bypass control of the West input (straight output East).
// Random flits and router state against a reference of the bypass rules: only
// SVC flits; heads need a productive straight move, an idle output, a free SVC
// there, an empty downstream SVC and an empty local SVC buffer; bodies need the
// lane to own the output SVC, an idle output, an empty buffer and a credit.
`timescale 1ns/1ps
module tb_bypass_control;
  import slide_pkg::*;
  logic in_valid, lane_empty, lane_active, out_idle, svc_free, ds_svc_empty, ds_svc_credit;
  flit_t in_flit;
  logic [NPORT-1:0] cand;
  logic [2:0] lane_route;
  logic [1:0] lane_out_vc;
  logic bypass, claim, release_svc;
  int checks = 0, failures = 0;
  int n_byp = 0;

  bypass_control #(.PORT(P_WEST)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      bit e, hd, tl;
      in_valid      = $urandom_range(0, 7) != 0;
      in_flit       = '0;
      in_flit.ftype = ftype_e'($urandom_range(0, 3));
      in_flit.svc   = $urandom_range(0, 3) != 0;
      in_flit.vc    = 1'($urandom);
      cand          = NPORT'($urandom);
      lane_empty    = $urandom_range(0, 3) != 0;
      lane_active   = 1'($urandom);
      lane_route    = ($urandom_range(0, 1)) ? 3'(P_EAST) : 3'($urandom_range(0, 4));
      lane_out_vc   = ($urandom_range(0, 1)) ? 2'(L_SVC) : 2'($urandom_range(0, 2));
      out_idle      = $urandom_range(0, 3) != 0;
      svc_free      = $urandom_range(0, 3) != 0;
      ds_svc_empty  = $urandom_range(0, 3) != 0;
      ds_svc_credit = $urandom_range(0, 3) != 0;
      #1;
      hd = (in_flit.ftype == FT_HEAD) || (in_flit.ftype == FT_HEADTAIL);
      tl = (in_flit.ftype == FT_TAIL) || (in_flit.ftype == FT_HEADTAIL);
      e = 0;
      if (in_valid && in_flit.svc && lane_empty && out_idle) begin
        if (hd) e = cand[P_EAST] && !lane_active && svc_free && ds_svc_empty;
        else    e = lane_active && lane_route == P_EAST && lane_out_vc == L_SVC && ds_svc_credit;
      end
      checks++;
      if (bypass !== e || claim !== (e && hd && !tl) || release_svc !== (e && tl && !hd)) begin
        failures++;
        $display("FAIL t=%0d byp=%b exp=%b", t, bypass, e);
      end
      if (e) n_byp++;
    end
    checks++;
    if (n_byp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
