// tb_slide_pkg: checks the shared package: flit and header widths, header
// extraction from a head flit, head/tail decoding of all flit types and the
// opposite-port map used by the bypass paths.
`timescale 1ns/1ps
module tb_slide_pkg;
  import slide_pkg::*;
  int checks = 0, failures = 0;

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t f;
    hdr_t h;
    chk(FLIT_W == 132, "flit is 128 data + 4 control bits");
    chk(HDR_W == 10, "header is five 2-bit coordinates");
    for (int t = 0; t < 100; t++) begin
      h = hdr_t'($urandom);
      f = '0;
      f.data = {$urandom, $urandom, $urandom, $urandom};
      f.data[HDR_W-1:0] = h;
      chk(get_hdr(f) == h, "header extraction");
    end
    chk(is_head(FT_HEAD) && !is_tail(FT_HEAD), "head");
    chk(!is_head(FT_BODY) && !is_tail(FT_BODY), "body");
    chk(!is_head(FT_TAIL) && is_tail(FT_TAIL), "tail");
    chk(is_head(FT_HEADTAIL) && is_tail(FT_HEADTAIL), "head-tail");
    chk(opposite(P_EAST) == P_WEST && opposite(P_WEST) == P_EAST, "E/W opposite");
    chk(opposite(P_NORTH) == P_SOUTH && opposite(P_SOUTH) == P_NORTH, "N/S opposite");
    chk(opposite(P_LOCAL) == P_LOCAL, "local has no opposite");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
