// tb_gh_probe_top: the end-to-end test of tb_gh_probe_full at reduced
// sizes (3 PEs of 16 vote boxes, 4 slices, 16 scene points, 64 bins), so
// that it runs in seconds.  See gh_probe_tb_body.svh for what is checked.
module tb_gh_probe_top;
  localparam int P = 3, N = 16, MUX = 8, T = 4, S = 16;
  localparam int BIN_W = 6, XY_W = 8, UV_W = 8, VOTE_W = 8;
`include "gh_probe_tb_body.svh"

  gh_probe_top #(
    .P(P), .N(N), .MUX(MUX), .T(T), .S(S), .BIN_W(BIN_W), .XY_W(XY_W), .UV_W(UV_W), .VOTE_W(VOTE_W)
  ) dut (.*);
endmodule
