// tb_svc_tagger: the two SVC tagging rules. A head is tagged only when the SVC is
// unassigned and the downstream SVC is empty; a bypassing flit in the same cycle
// blocks the tag; the owner's tail releases the SVC. Checked against a model
// over random sequences, plus a directed sequence.
`timescale 1ns/1ps
module tb_svc_tagger;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ds_svc_empty, byp_any, byp_claim, head_gnt, head_only, release_svc;
  logic svc_free, tag_ok, tag;
  int checks = 0, failures = 0, n_tag = 0;
  bit busy = 0;

  svc_tagger dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {ds_svc_empty, byp_any, byp_claim, head_gnt, head_only, release_svc} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      bit e_free, e_ok, e_tag;
      @(negedge clk);
      ds_svc_empty = $urandom_range(0, 3) != 0;
      byp_any   = (!busy && ds_svc_empty) ? ($urandom_range(0, 3) == 0) : (busy && $urandom_range(0, 3) == 0);
      byp_claim = byp_any && !busy && $urandom_range(0, 1);
      head_gnt  = $urandom_range(0, 1);
      head_only = $urandom_range(0, 3) != 0;
      release_svc = busy && !byp_claim && $urandom_range(0, 3) == 0;
      #1;
      e_free = !busy && ds_svc_empty;
      e_ok   = e_free && !byp_any;
      e_tag  = head_gnt && e_ok;
      checks++;
      if (svc_free !== e_free || tag_ok !== e_ok || tag !== e_tag) begin
        failures++;
        $display("FAIL t=%0d busy=%0d free=%b ok=%b tag=%b", t, busy, svc_free, tag_ok, tag);
      end
      if (e_tag) n_tag++;
      @(posedge clk);
      #1;
      if (byp_claim) busy = 1;
      else if (e_tag && head_only) busy = 1;
      else if (release_svc) busy = 0;
    end
    checks++;
    if (n_tag == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
